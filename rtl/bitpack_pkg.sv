// bitpack_pkg: types and constants shared by the stochastic-computing (SC)
// evaluation core.
//
// sn_cfg_e is the two-bit configuration carried by every stochastic number
// generator (SNG) and every counter: 00 unipolar, 01 bipolar, 10 two-line, 11
// reserved for a user-defined representation. These codes follow the
// framework's description; what each code does inside the SNG and counter is
// this design's choice and is documented in sn_gen.sv and sn_count.sv.
//
// user_circuit_e selects which SC circuit the wrapper instantiates. In the
// original flow a code generator writes one wrapper per user circuit; here the
// three circuits the framework is demonstrated and evaluated with are selected
// by a parameter instead.
//
// The register map of the AXI-Lite control slave is this design's own choice.
package bitpack_pkg;

  localparam int WORD_W = 32;   // every array element is a 32-bit integer

  typedef enum logic [1:0] {
    SN_UNIPOLAR = 2'b00,
    SN_BIPOLAR  = 2'b01,
    SN_TWOLINE  = 2'b10,
    SN_RESERVED = 2'b11
  } sn_cfg_e;

  typedef enum int {
    UC_ADDMUL = 0,   // product and mean of four inputs (6 SNGs, 2 counters)
    UC_PROD   = 1,   // N-input AND (N SNGs, 1 counter)
    UC_EPROD  = 2    // N/2 two-input ANDs (N SNGs, N/2 counters)
  } user_circuit_e;

  // Number of SNGs (input bits) of a user circuit.
  function automatic int num_src(user_circuit_e uc, int n);
    case (uc)
      UC_ADDMUL: return 6;
      default:   return n;
    endcase
  endfunction

  // Number of counters (output bits) of a user circuit.
  function automatic int num_dst(user_circuit_e uc, int n);
    case (uc)
      UC_ADDMUL: return 2;
      UC_PROD:   return 1;
      default:   return n / 2;
    endcase
  endfunction

  // 32-bit Fibonacci LFSR, taps 32, 22, 2, 1 (x^32 + x^22 + x^2 + x + 1),
  // shifting towards the MSB. The all-zero state is a lock-up state.
  function automatic logic [31:0] lfsr_next(logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  // A zero seed would lock the LFSR; it is replaced by this value.
  localparam logic [31:0] LFSR_ZERO_SEED = 32'h0000_0001;

  // AXI-Lite register byte offsets.
  localparam logic [5:0] REG_CTRL    = 6'h00;  // W: bit0 start. R: bit0 busy, bit1 done
  localparam logic [5:0] REG_CYCLE   = 6'h04;  // bitstream length l
  localparam logic [5:0] REG_SRC     = 6'h08;  // input array pointer
  localparam logic [5:0] REG_DST     = 6'h0C;  // output array pointer
  localparam logic [5:0] REG_NUM_SRC = 6'h10;  // R: number of SNGs
  localparam logic [5:0] REG_NUM_DST = 6'h14;  // R: number of counters

  localparam logic [1:0] AXI_BURST_INCR = 2'b01;
  localparam logic [1:0] AXI_RESP_OKAY  = 2'b00;

endpackage
