// rc4_control: the control unit shared by all functional units.
//
// A sixteen-state machine that walks every functional unit through one
// candidate key per pass, following the document's state diagram:
//
//   Clear -> Load Ram (256 cycles, S[i] = i)
//         -> key schedule, 256 x {Read Si, Read Sj, Write Si to Sj,
//            Write Sj to Si}
//         -> Test Clear
//         -> 4 x {Read Si, Read Sj, Write Si to Sj, Write Sj to Si,
//            Read Sk}   (one keystream byte each)
//         -> Test Done -> Has the key been found -> Done | Next K -> Load Ram
//
// One key therefore takes 256 + 1024 + 1 + 20 + 3 = 1304 cycles, the figure
// the document reports. The control unit owns the i counter and broadcasts it
// (the document's functional-unit diagram takes i as an input), the count of
// keystream bytes tested, and the selection of the expected keystream byte.
// Keystream byte n is read in Read Sk and compared one cycle later: in the next
// In Testing Read Si for bytes 1..3 and in Test Done for byte 4, as the
// document describes.
//
// This design's own choices: Test Clear also steps i from 0 to 1 (the
// keystream loop increments i before it reads S[i]); the key schedule clears j
// during Load Ram; the unit stops in Done when `keys_per_fu` keys have been
// tested without a match (`exhausted`), where 0 means 2^KEY_W keys. In Done
// the K-arrays are switched to the external probe address.
//
// Interface: `any_found` is the OR of the functional units' key_found outputs.
// `ksr_load` loads the key space registers (in Clear), `ksr_inc` steps them
// (in Next K). `test_bytes[n]` is keystream byte n+1 expected for the right
// key, i.e. known plaintext XOR ciphertext; it is read during the keystream
// phase and must be held stable.
module rc4_control
  import rc4_pkg::*;
#(
  parameter int unsigned KEY_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  byte_t            test_bytes [TEST_BYTES],
  input  logic [KEY_W-1:0] keys_per_fu,
  input  logic             any_found,
  output fu_ctrl_t         ctrl,
  output logic             ksr_load,
  output logic             ksr_inc,
  output state_t           state,
  output logic             done,
  output logic             found,
  output logic             exhausted,
  output logic [KEY_W-1:0] keys_tested
);

  state_t     state_d;
  byte_t      i_q, i_d;
  logic [2:0] tested_q, tested_d;     // keystream bytes read so far (0..4)
  logic       found_d, exhausted_d;
  logic [KEY_W-1:0] keys_tested_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= ST_CLEAR;
      i_q         <= '0;
      tested_q    <= '0;
      found       <= 1'b0;
      exhausted   <= 1'b0;
      keys_tested <= '0;
    end else begin
      state       <= state_d;
      i_q         <= i_d;
      tested_q    <= tested_d;
      found       <= found_d;
      exhausted   <= exhausted_d;
      keys_tested <= keys_tested_d;
    end
  end

  always_comb begin
    state_d       = state;
    i_d           = i_q;
    tested_d      = tested_q;
    found_d       = found;
    exhausted_d   = exhausted;
    keys_tested_d = keys_tested;
    ksr_load      = 1'b0;
    ksr_inc       = 1'b0;

    ctrl            = '0;
    ctrl.i          = i_q;
    ctrl.s_addr_sel = SADDR_I;
    ctrl.s_data_sel = SDATA_I;
    ctrl.test_byte  = test_bytes[(tested_q == 3'd0) ? 0 : int'(tested_q) - 1];

    unique case (state)
      ST_CLEAR: begin
        ksr_load      = 1'b1;
        i_d           = '0;
        tested_d      = '0;
        found_d       = 1'b0;
        exhausted_d   = 1'b0;
        keys_tested_d = KEY_W'(1);
        ctrl.j_clr    = 1'b1;
        ctrl.cnt_clr  = 1'b1;
        state_d       = ST_LOAD_RAM;
      end
      ST_LOAD_RAM: begin
        ctrl.s_addr_sel = SADDR_I;
        ctrl.s_data_sel = SDATA_I;
        ctrl.s_we       = 1'b1;
        ctrl.k_load     = (i_q == 8'd0);
        ctrl.j_clr      = 1'b1;
        i_d             = i_q + 8'd1;
        if (i_q == 8'd255) state_d = ST_READ_SI;
      end
      ST_READ_SI: begin
        ctrl.s_addr_sel = SADDR_I;
        state_d         = ST_READ_SJ;
      end
      ST_READ_SJ: begin
        ctrl.s_addr_sel = SADDR_JNEW;
        ctrl.k_add      = 1'b1;
        ctrl.si_en      = 1'b1;
        ctrl.j_en       = 1'b1;
        state_d         = ST_WRITE_SI_SJ;
      end
      ST_WRITE_SI_SJ: begin
        ctrl.s_addr_sel = SADDR_J;
        ctrl.s_data_sel = SDATA_SI;
        ctrl.s_we       = 1'b1;
        ctrl.sj_en      = 1'b1;
        state_d         = ST_WRITE_SJ_SI;
      end
      ST_WRITE_SJ_SI: begin
        ctrl.s_addr_sel = SADDR_I;
        ctrl.s_data_sel = SDATA_SJ;
        ctrl.s_we       = 1'b1;
        i_d             = i_q + 8'd1;
        state_d         = (i_q == 8'd255) ? ST_TEST_CLEAR : ST_READ_SI;
      end
      ST_TEST_CLEAR: begin
        ctrl.j_clr   = 1'b1;
        ctrl.cnt_clr = 1'b1;
        tested_d     = '0;
        i_d          = i_q + 8'd1;
        state_d      = ST_T_READ_SI;
      end
      ST_T_READ_SI: begin
        ctrl.s_addr_sel = SADDR_I;
        ctrl.cmp_en     = (tested_q != 3'd0);
        state_d         = ST_T_READ_SJ;
      end
      ST_T_READ_SJ: begin
        ctrl.s_addr_sel = SADDR_JNEW;
        ctrl.si_en      = 1'b1;
        ctrl.j_en       = 1'b1;
        state_d         = ST_T_WRITE_SI_SJ;
      end
      ST_T_WRITE_SI_SJ: begin
        ctrl.s_addr_sel = SADDR_J;
        ctrl.s_data_sel = SDATA_SI;
        ctrl.s_we       = 1'b1;
        ctrl.sj_en      = 1'b1;
        state_d         = ST_T_WRITE_SJ_SI;
      end
      ST_T_WRITE_SJ_SI: begin
        ctrl.s_addr_sel = SADDR_I;
        ctrl.s_data_sel = SDATA_SJ;
        ctrl.s_we       = 1'b1;
        i_d             = i_q + 8'd1;
        state_d         = ST_T_READ_SK;
      end
      ST_T_READ_SK: begin
        ctrl.s_addr_sel = SADDR_T;
        tested_d        = tested_q + 3'd1;
        state_d = (tested_q == 3'(TEST_BYTES - 1)) ? ST_TEST_DONE : ST_T_READ_SI;
      end
      ST_TEST_DONE: begin
        ctrl.cmp_en = 1'b1;
        state_d     = ST_CHECK_FOUND;
      end
      ST_CHECK_FOUND: begin
        if (any_found) begin
          found_d = 1'b1;
          state_d = ST_DONE;
        end else if (keys_tested == keys_per_fu) begin
          exhausted_d = 1'b1;
          state_d     = ST_DONE;
        end else begin
          state_d = ST_NEXT_K;
        end
      end
      ST_NEXT_K: begin
        ksr_inc       = 1'b1;
        keys_tested_d = keys_tested + KEY_W'(1);
        i_d           = '0;
        state_d       = ST_LOAD_RAM;
      end
      ST_DONE: begin
        ctrl.k_ext = 1'b1;
      end
      default: state_d = ST_CLEAR;
    endcase
  end

  assign done = (state == ST_DONE);

  // A keystream byte is only compared in the two states the schedule allots.
  a_cmp_states: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.cmp_en |-> (state inside {ST_T_READ_SI, ST_TEST_DONE}));
  // The S-array is never written while its output is being captured into Si.
  a_no_write_on_si: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.s_we && ctrl.si_en));

endmodule
