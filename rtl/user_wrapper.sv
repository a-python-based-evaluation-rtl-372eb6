// user_wrapper: stochastic number generators, the user circuit and counters,
// with the sequencer that loads, runs and unloads them.
//
// One SNG (sn_gen) feeds each input bit of the user circuit and one counter
// (sn_count) takes each output bit. A run has three phases:
//   LOAD   : 2*NUM_SRC words are taken from the read FIFO. Word 2k is the
//            binary value of SNG k, word 2k+1 its LFSR seed (the input array
//            is an array of {value, seed} structures). All counters are
//            cleared when the run starts. The phase waits while the FIFO is
//            empty.
//   RUN    : proc_en is high for exactly `cycles` clocks. In each of them
//            every SNG produces one bit, the user circuit combines them and
//            every counter accumulates one bit.
//   UNLOAD : the counters shift as one chain towards counter 0; NUM_DST words
//            leave through wr_data into the write FIFO, counter 0 first. The
//            phase waits while the FIFO is full.
// `done` pulses for one clock after the last word is pushed.
//
// The SNG/user circuit/counter structure, the per-port two-bit configuration,
// distribution of read data to the SNGs and shift-register unloading of the
// counters follow the framework. The word order, phase sequencing and the
// selection of the user circuit by the USER parameter (instead of a generated
// wrapper per circuit) are this design's choices. Bit order of the ports
// follows the framework's example: input bits numbered across the ports in
// declaration order (A[0..3] then SEL[0..1]), likewise outputs (PROD, AVG).
// With SN_TWOLINE, SNG k's negative line is available on src_m[k] but the
// three built-in user circuits have single-line ports, so only the positive
// lines reach them; a counter's negative line is tied low.
module user_wrapper
  import bitpack_pkg::*;
#(
  parameter user_circuit_e USER    = UC_ADDMUL,
  parameter int            N       = 4,
  parameter int            NUM_SRC = num_src(USER, N),
  parameter int            NUM_DST = num_dst(USER, N),
  parameter sn_cfg_e       SRC_CFG [NUM_SRC] = '{default: SN_UNIPOLAR},
  parameter sn_cfg_e       DST_CFG [NUM_DST] = '{default: SN_UNIPOLAR}
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] cycles,
  output logic        busy,
  output logic        done,
  output logic        proc_en,
  // read FIFO
  output logic        rd_pop,
  input  logic [31:0] rd_data,
  input  logic        rd_empty,
  // write FIFO
  output logic        wr_push,
  output logic [31:0] wr_data,
  input  logic        wr_full
);

  localparam int NLOAD = 2 * NUM_SRC;
  localparam int IW    = $clog2(NLOAD + 1);
  localparam int OW    = $clog2(NUM_DST + 1);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_UNLOAD} state_e;

  state_e       state;
  logic [IW-1:0] ld_idx;
  logic [OW-1:0] ul_idx;
  logic [31:0]  run_left;
  logic [31:0]  run_len;
  logic         clear;

  logic [NUM_SRC-1:0] src_p, src_m;
  logic [NUM_DST-1:0] dst_p;
  logic [31:0]        cval [NUM_DST];

  assign rd_pop  = (state == S_LOAD) && !rd_empty;
  assign proc_en = (state == S_RUN) && (run_left != '0);
  assign wr_push = (state == S_UNLOAD) && !wr_full;
  assign wr_data = cval[0];
  assign clear   = (state == S_IDLE) && start;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ld_idx   <= '0;
      ul_idx   <= '0;
      run_left <= '0;
      run_len  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          run_len <= cycles;
          ld_idx  <= '0;
          state   <= S_LOAD;
        end
        S_LOAD: if (rd_pop) begin
          ld_idx <= ld_idx + 1'b1;
          if (ld_idx == IW'(NLOAD - 1)) begin
            run_left <= run_len;
            state    <= S_RUN;
          end
        end
        S_RUN: begin
          if (run_left != '0) run_left <= run_left - 32'd1;
          else begin
            ul_idx <= '0;
            state  <= S_UNLOAD;
          end
        end
        S_UNLOAD: if (wr_push) begin
          ul_idx <= ul_idx + 1'b1;
          if (ul_idx == OW'(NUM_DST - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- SNGs ----------------
  for (genvar k = 0; k < NUM_SRC; k++) begin : g_sng
    logic [1:0] sn;
    sn_gen #(.CFG(SRC_CFG[k])) u_sng (
      .clk       (clk),
      .rst_n     (rst_n),
      .load_bin  (rd_pop && ld_idx == IW'(2 * k)),
      .load_seed (rd_pop && ld_idx == IW'(2 * k + 1)),
      .din       (rd_data),
      .en        (proc_en),
      .sn        (sn)
    );
    assign src_p[k] = sn[0];
    assign src_m[k] = sn[1];
  end

  // ---------------- user circuit ----------------
  if (USER == UC_ADDMUL) begin : g_user
    bit_addmul u_user (
      .CLK  (clk),
      .A    (src_p[3:0]),
      .SEL  (src_p[5:4]),
      .PROD (dst_p[0]),
      .AVG  (dst_p[1])
    );
  end else if (USER == UC_PROD) begin : g_user
    sc_prod #(.N(N)) u_user (
      .A (src_p),
      .P (dst_p[0])
    );
  end else begin : g_user
    sc_eprod #(.N(N)) u_user (
      .A (src_p[N/2-1:0]),
      .B (src_p[N-1:N/2]),
      .C (dst_p)
    );
  end

  // ---------------- counters (a shift chain towards counter 0) ----------------
  for (genvar k = 0; k < NUM_DST; k++) begin : g_cnt
    sn_count #(.CFG(DST_CFG[k])) u_cnt (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear),
      .en       (proc_en),
      .sn       ({1'b0, dst_p[k]}),
      .shift    (wr_push),
      .shift_in ((k + 1 < NUM_DST) ? cval[(k + 1) % NUM_DST] : 32'd0),
      .value    (cval[k])
    );
  end

endmodule
