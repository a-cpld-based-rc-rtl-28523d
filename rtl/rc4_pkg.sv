// rc4_pkg: types and constants shared by the RC4 key-search engine.
//
// The engine tests candidate keys for RC4 by brute force. One control unit
// steps every functional unit through the same sequence of states, so the
// per-cycle commands it issues are bundled into one struct, fu_ctrl_t, that is
// broadcast to all functional units. The state list mirrors the sixteen states
// of the engine's state diagram; the mux selectors name the inputs of the
// S-array address and data multiplexers of a functional unit.
package rc4_pkg;

  // Size of the RC4 state array and width of its entries.
  localparam int unsigned S_DEPTH    = 256;
  localparam int unsigned BYTE_W     = 8;
  // Number of keystream bytes compared per candidate key.
  localparam int unsigned TEST_BYTES = 4;

  typedef logic [BYTE_W-1:0] byte_t;

  // Controller states, one per box of the state diagram.
  typedef enum logic [3:0] {
    ST_CLEAR,          // load key space registers, clear counters
    ST_LOAD_RAM,       // S[i] = i, 256 cycles
    ST_READ_SI,        // key schedule: read S[i]
    ST_READ_SJ,        // key schedule: j += S[i] + K[i mod n], read S[j]
    ST_WRITE_SI_SJ,    // key schedule: S[j] = old S[i]
    ST_WRITE_SJ_SI,    // key schedule: S[i] = old S[j], i++
    ST_TEST_CLEAR,     // start of keystream phase: j = 0, i = 1
    ST_T_READ_SI,      // keystream: read S[i], compare previous byte
    ST_T_READ_SJ,      // keystream: j += S[i], read S[j]
    ST_T_WRITE_SI_SJ,  // keystream: S[j] = old S[i]
    ST_T_WRITE_SJ_SI,  // keystream: S[i] = old S[j], i++
    ST_T_READ_SK,      // keystream: read S[S[i] + S[j]]
    ST_TEST_DONE,      // compare the fourth keystream byte
    ST_CHECK_FOUND,    // decide: done, or next key
    ST_NEXT_K,         // step every key space register
    ST_DONE            // result held for the user
  } state_t;

  // Source of the S-array address.
  typedef enum logic [1:0] {
    SADDR_I,     // i counter
    SADDR_JNEW,  // output of the j adder (new j, same cycle)
    SADDR_J,     // j register
    SADDR_T      // output of the Si + Sj adder
  } s_addr_sel_t;

  // Source of the S-array write data.
  typedef enum logic [1:0] {
    SDATA_I,     // i counter (initial fill)
    SDATA_SI,    // Si register
    SDATA_SJ     // Sj register
  } s_data_sel_t;

  // Commands broadcast from the control unit to every functional unit.
  typedef struct packed {
    byte_t       i;           // shared i counter
    s_addr_sel_t s_addr_sel;
    s_data_sel_t s_data_sel;
    logic        s_we;        // write the S-array
    logic        k_add;       // 1: j adder adds the key byte, 0: adds zero
    logic        k_load;      // copy the key space register into the K-array
    logic        k_ext;       // K-array addressed from outside (probe)
    logic        si_en;       // load Si register from the S-array output
    logic        sj_en;       // load Sj register from the S-array output
    logic        j_en;        // load j from the j adder
    logic        j_clr;       // clear j
    logic        cnt_clr;     // clear the bytes-correct counter
    logic        cmp_en;      // S-array output holds a keystream byte: compare it
    byte_t       test_byte;   // expected keystream byte for this compare
  } fu_ctrl_t;

endpackage
