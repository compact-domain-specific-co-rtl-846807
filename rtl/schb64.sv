// schb64: 64 x 64-coefficient schoolbook polynomial multiplier with NM parallel
// multiply-accumulate cells (one of the seven point-wise multipliers of Toom-Cook-4).
//
// It computes the full 127-coefficient product c = a * b of two 64-coefficient
// polynomials modulo 2^16 (no ring reduction: Toom-Cook recombines the pieces later).
// In MAC mode the product is added onto the result already held, which lets the
// module structure of Saber accumulate several products before a single
// interpolation.
//
// How it works (follows the design description and its Fig. 1):
//   * b is processed in chunks of NM coefficients b[j..j+NM-1]. A chunk is loaded
//     from the dual-port b memory, two coefficients per cycle (NM/2 cycles).
//   * All 64 coefficients of a are then streamed, one per cycle, and broadcast to the
//     NM multipliers. Cell m computes a[t]*b[j+m] and adds the partial sum of its
//     right-hand neighbour, so partial sums shift left by one cell per cycle and the
//     leftmost register res[0] delivers coefficient t+j complete for this chunk. The
//     rightmost cell adds the partial sum c[t+j+NM-1] read from the result memory
//     (earlier chunks, or the previous product in MAC mode) or zero.
//   * The multipliers carry two pipeline stages (low and high partial products, then
//     their sum); the accumulation path has no extra register, so the data flow of the
//     chain is unchanged. Together with the registered a operand this gives a 4-cycle
//     fill; NM-1 further cycles flush the chain.
//   * Latency per multiplication is 64/NM * (NM/2 + 4 + 64 + NM-1) cycles, 1168 for
//     NM = 4, exactly the figure given in the design description. The chain is primed
//     during the fill, which needs NM-1 cycles; for NM > 4 the fill therefore grows
//     from 4 to NM cycles (664 instead of 632 cycles for NM = 8, 412 instead of 364
//     for NM = 16), a departure from the latency formula of the description, which
//     does not say how the chain is primed.
// Memories: operand a single-port LUT RAM, operand b dual-port LUT RAM, result
// dual-port LUT RAM (write one finished coefficient and read one partial sum per cycle).
//
// Interface: while idle, ld_a_we / ld_b_we write ld_data at ld_addr into the operand
// memories, and rd_addr reads the result memory asynchronously on rd_data. start
// (with mac) begins a multiplication; busy is high for exactly the 1168 cycles (NM = 4) of
// the operation and done pulses in its last cycle. Loads and start are ignored while busy.
// The result-memory word 127 is never written (the product has 127 coefficients).
// Choices of this implementation: the split of the multiplier into two partial
// products, priming the chain during the first NM-1 fill cycles with partial sums
// read from the result memory, and the control counters.
module schb64
  import saber_pkg::*;
#(
  parameter int unsigned NM = 4    // number of multipliers (DSPs)
) (
  input  logic       clk,
  input  logic       rst_n,
  // operand loading (from the evaluation datapath)
  input  logic       ld_a_we,
  input  logic       ld_b_we,
  input  logic [5:0] ld_addr,
  input  coef_t      ld_data,
  // control
  input  logic       start,
  input  logic       mac,
  output logic       busy,
  output logic       done,
  // result read-out (to the interpolation datapath)
  input  logic [6:0] rd_addr,
  output coef_t      rd_data
);

  localparam int unsigned NCHUNK = SUB_N / NM;       // 16 chunks of b
  localparam int unsigned LOADC  = NM / 2;           // b load cycles per chunk
  localparam int unsigned PIPE   = 3;                // a register + two multiplier stages
  // cycles before the first product reaches the chain; at least NM-1 so that the chain
  // can be primed with partial sums (3 for NM <= 4)
  localparam int unsigned PRE    = (NM - 1 > PIPE) ? NM - 1 : PIPE;
  localparam int unsigned FILL   = PRE + 1;          // first finished coefficient
  localparam int unsigned ASKEW  = PRE - PIPE;       // first a read
  localparam int unsigned STREAM = FILL + SUB_N + NM - 1;  // 71 stream cycles for NM = 4

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_STREAM} state_e;

  state_e       state;
  logic [$clog2(NCHUNK)-1:0] chunk;
  logic [$clog2(LOADC+1)-1:0] lcnt;
  logic [6:0]   s;           // stream cycle inside a chunk
  logic         mac_q;
  logic [6:0]   jbase;       // first b index of the current chunk

  assign jbase = 7'(chunk * NM);
  assign busy  = (state != S_IDLE);
  assign done  = (state == S_STREAM) && (s == 7'(STREAM - 1)) && (chunk == $bits(chunk)'(NCHUNK - 1));

  // ------------------------------------------------------------------ memories
  coef_t a_rdata, b_rdata_a, b_rdata_b, r_rdata_a, r_rdata_b;
  logic [5:0] a_addr, b_addr_a, b_addr_b;
  logic [6:0] r_addr_a, r_addr_b;
  logic       r_we;
  coef_t      res [NM];

  assign a_addr   = (state == S_STREAM) ? 6'(s - 7'(ASKEW)) : ld_addr;
  assign b_addr_a = (state == S_LOAD) ? 6'(jbase + 7'(2 * lcnt))     : ld_addr;
  assign b_addr_b = 6'(jbase + 7'(2 * lcnt) + 7'd1);
  // Port A of the result memory: write of the finished coefficient t+j = s-4+j.
  assign r_we     = (state == S_STREAM) && (s >= 7'(FILL));
  assign r_addr_a = busy ? (jbase + s - 7'(FILL)) : rd_addr;
  // Port B: partial sum for the rightmost cell, coefficient t+j+NM-1 with t = s-PRE.
  assign r_addr_b = jbase + s + 7'(NM - 1) - 7'(PRE);
  assign rd_data  = r_rdata_a;

  lutram_sp #(.DEPTH(SUB_N), .WIDTH(COEF_W)) u_a_mem (
    .clk, .we(ld_a_we && !busy), .addr(a_addr), .wdata(ld_data), .rdata(a_rdata));

  lutram_dp #(.DEPTH(SUB_N), .WIDTH(COEF_W)) u_b_mem (
    .clk, .we_a(ld_b_we && !busy), .addr_a(b_addr_a), .wdata_a(ld_data),
    .rdata_a(b_rdata_a), .addr_b(b_addr_b), .rdata_b(b_rdata_b));

  lutram_dp #(.DEPTH(2 * SUB_N), .WIDTH(COEF_W)) u_res_mem (
    .clk, .we_a(r_we), .addr_a(r_addr_a), .wdata_a(res[0]), .rdata_a(r_rdata_a),
    .addr_b(r_addr_b), .rdata_b(r_rdata_b));

  // ------------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      chunk <= '0;
      lcnt  <= '0;
      s     <= '0;
      mac_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          chunk <= '0;
          lcnt  <= '0;
          mac_q <= mac;
        end
        S_LOAD: begin
          if (lcnt == $bits(lcnt)'(LOADC - 1)) begin
            state <= S_STREAM;
            s     <= '0;
          end
          lcnt <= lcnt + 1'b1;
        end
        S_STREAM: begin
          s <= s + 7'd1;
          if (s == 7'(STREAM - 1)) begin
            lcnt <= '0;
            if (chunk == $bits(chunk)'(NCHUNK - 1)) state <= S_IDLE;
            else begin
              state <= S_LOAD;
              chunk <= chunk + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------ datapath
  coef_t b_q  [NM];
  coef_t a_q;
  coef_t p_lo [NM];
  logic [7:0] p_hi [NM];
  coef_t p_q  [NM];
  coef_t c_in;
  logic  use_mem;

  // Partial sum entering the rightmost cell: earlier chunks exist for coefficients up
  // to j+62 (t <= 63-NM, i.e. s <= 62 for NM = 4); in MAC mode the whole previous
  // product is valid.
  assign use_mem = mac_q || ((chunk != '0) && (s <= 7'(SUB_N - 1 - NM + PRE)));
  assign c_in    = use_mem ? r_rdata_b : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      for (int m = 0; m < NM; m++) begin
        b_q[m]  <= '0;
        p_lo[m] <= '0;
        p_hi[m] <= '0;
        p_q[m]  <= '0;
        res[m]  <= '0;
      end
    end else begin
      // operand a: zero outside the 64 streaming cycles so that fill and flush add nothing
      a_q <= (state == S_STREAM && 7'(s - 7'(ASKEW)) < 7'(SUB_N)) ? a_rdata : '0;
      // operand b: two coefficients per load cycle
      if (state == S_LOAD) begin
        b_q[2*lcnt]     <= b_rdata_a;
        b_q[2*lcnt + 1] <= b_rdata_b;
      end
      for (int m = 0; m < NM; m++) begin
        // multiplier pipeline stage 1: partial products (mod 2^16)
        p_lo[m] <= coef_t'(a_q * {8'd0, b_q[m][7:0]});
        p_hi[m] <= 8'(a_q[7:0] * b_q[m][15:8]);
        // multiplier pipeline stage 2: product
        p_q[m]  <= p_lo[m] + {p_hi[m], 8'd0};
        // accumulation with the right-hand neighbour's partial sum
        res[m]  <= p_q[m] + ((m == NM - 1) ? c_in : res[(m + 1) % NM]);
      end
    end
  end

  // ------------------------------------------------------------------ checks
  initial assert (NM >= 2 && NM % 2 == 0 && SUB_N % NM == 0 && STREAM < 128)
    else $error("schb64: NM must be even, divide 64 and be at most 32");

  property p_no_start_busy;
    @(posedge clk) disable iff (!rst_n) busy |-> !done || $past(busy);
  endproperty
  assert property (p_no_start_busy);

endmodule
