// rc4_functional_unit: tests one candidate RC4 key per pass.
//
// The unit holds the RC4 state (S-array, 256 x 8 single-port RAM), the key
// bytes (K-array), the registers Si, Sj and j, two adders, a comparator and a
// bytes-correct counter, as in the document's functional-unit block diagram.
// It has no sequencing of its own: every cycle the shared control unit tells
// it, through `ctrl`, what to address, what to write and which registers to
// load, so all units run in lock-step on different keys.
//
//   j adder    : j_new = j + S-array output + (k_add ? K[i mod KEY_BYTES] : 0)
//                It feeds the S-array address in the same cycle, so computing
//                j costs no extra clock.
//   t adder    : t = Si + Sj, the address of the keystream byte.
//   comparator : S-array output == ctrl.test_byte, counted when ctrl.cmp_en.
//
// Timing (one-cycle read latency of the S-array): the cycle after S[i] is
// addressed, the RAM output holds S[i]; the j adder adds it and addresses
// S[j_new], Si captures it and j takes j_new. The next cycle the output holds
// S[j]; Sj captures it while Si is written to S[j]. Then Sj is written to S[i].
// key_found is high while all four compared bytes matched.
//
// Following the document: the structure, the single-port state memory, the
// modulo-addressed key store and the zero input that turns the j adder into
// the keystream form. This design's choices: the RAM latency, the K-array
// load from the key space register, and the probe read port (`k_ext`), which
// lets the user read the matching key byte by byte through `ext_addr`.
module rc4_functional_unit
  import rc4_pkg::*;
#(
  parameter int unsigned KEY_BYTES = 4,
  parameter int unsigned KA_W      = (KEY_BYTES > 1) ? $clog2(KEY_BYTES) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  fu_ctrl_t               ctrl,
  input  logic [8*KEY_BYTES-1:0] key_in,     // from the key space register
  input  logic [KA_W-1:0]        ext_addr,   // probe address into the K-array
  output byte_t                  k_byte,     // K-array read port
  output logic                   key_found
);

  byte_t            s_rdata, s_wdata, s_addr;
  byte_t            si_q, sj_q, j_q;
  byte_t            j_new, t_sum, k_term;
  logic [KA_W-1:0]  k_addr;
  logic [2:0]       correct_q;   // bytes-correct counter, 0..TEST_BYTES

  // K-array address mux: i modulo the key length, or the external address.
  always_comb begin
    if (ctrl.k_ext) k_addr = ext_addr;
    else            k_addr = KA_W'(32'(ctrl.i) % KEY_BYTES);
  end

  rc4_k_array #(.KEY_BYTES(KEY_BYTES), .ADDR_W(KA_W)) u_k_array (
    .clk    (clk),
    .load   (ctrl.k_load),
    .key_in (key_in),
    .addr   (k_addr),
    .rdata  (k_byte)
  );

  // The two adders.
  assign k_term = ctrl.k_add ? k_byte : '0;
  assign j_new  = j_q + s_rdata + k_term;
  assign t_sum  = si_q + sj_q;

  // S-array address and data muxes.
  always_comb begin
    unique case (ctrl.s_addr_sel)
      SADDR_I:    s_addr = ctrl.i;
      SADDR_JNEW: s_addr = j_new;
      SADDR_J:    s_addr = j_q;
      SADDR_T:    s_addr = t_sum;
      default:    s_addr = ctrl.i;
    endcase
    unique case (ctrl.s_data_sel)
      SDATA_I:  s_wdata = ctrl.i;
      SDATA_SI: s_wdata = si_q;
      SDATA_SJ: s_wdata = sj_q;
      default:  s_wdata = ctrl.i;
    endcase
  end

  rc4_s_array #(.DEPTH(S_DEPTH), .WIDTH(BYTE_W)) u_s_array (
    .clk   (clk),
    .we    (ctrl.s_we),
    .addr  (s_addr),
    .wdata (s_wdata),
    .rdata (s_rdata)
  );

  // Si, Sj and j registers, bytes-correct counter.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      si_q      <= '0;
      sj_q      <= '0;
      j_q       <= '0;
      correct_q <= '0;
    end else begin
      if (ctrl.si_en) si_q <= s_rdata;
      if (ctrl.sj_en) sj_q <= s_rdata;
      if (ctrl.j_clr)     j_q <= '0;
      else if (ctrl.j_en) j_q <= j_new;
      if (ctrl.cnt_clr)
        correct_q <= '0;
      else if (ctrl.cmp_en && (s_rdata == ctrl.test_byte))
        correct_q <= correct_q + 3'd1;
    end
  end

  assign key_found = (correct_q == 3'(TEST_BYTES));

endmodule
