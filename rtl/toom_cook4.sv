// toom_cook4: Toom-Cook 4-way multiplier of 256-coefficient polynomials, built from
// the evaluation datapath, seven 64x64 schoolbook multipliers (schb64) and the
// interpolation datapath, each step under its own control and started by a command.
//
//   CMD_EVAL   reads operand a (64 words from addr_a) and then operand b (64 words from
//              addr_b) of the system memory, one word = four coefficients per cycle,
//              and writes the seven weighted polynomials of each straight into the
//              operand memories of the seven schb64 units (a first, then b).
//              128 read cycles plus 2 pipeline cycles.
//   CMD_MUL    starts all seven schb64 units in parallel; the point-wise products
//   CMD_MAC    overwrite (MUL) or are added to (MAC) the products already held.
//              1168 cycles plus 2 control cycles.
//   CMD_INTERP interpolates the accumulated products into a 512-coefficient product
//              written from addr_c on (128 words, layout below). 64 * 8 write cycles
//              plus 6 pipeline cycles.
// A vector-vector product sum_i a_i * b_i is EVAL, MUL, then (EVAL, MAC) per further
// term and one INTERP ("lazy interpolation", as in the design description).
//
// Interpolation schedule (this implementation's own): iteration i of the interpolation
// produces contributions to coefficients i + 64*j, j = 0..6, for i = 0..126, so the
// contributions of iterations i and i+64 overlap. The controller feeds iterations p and
// p+64 into the pipelined interpolation datapath back to back and adds the two result
// rows into the eight final coefficients p + 64*j, j = 0..7, which are then written one
// per cycle, so every coefficient of the product is written exactly once and no
// read-modify-write of the system memory is needed. Iteration 127 does not exist and is
// fed as zeros. Results are written modulo 2^13 (upper three bits cleared).
//
// Memory layout (design description, Fig. 4): coefficient k of a polynomial based at
// word W lives in word W + k[5:0] (plus 64 * k[8] for the second half of a 512-
// coefficient product), 16-bit lane k[7:6]. Bases are word addresses chosen by the host;
// 256-coefficient polynomials are expected to start on a multiple of 64 words.
// Interface: cmd_valid with cmd_op and the three bases starts a command when idle (it is
// ignored while busy); done pulses in the last busy cycle.
module toom_cook4
  import saber_pkg::*;
#(
  parameter int unsigned NM        = 4,       // multipliers per schb64
  parameter int unsigned MEM_DEPTH = 1024,    // words of the system memory
  localparam int unsigned AW       = $clog2(MEM_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  input  cmd_op_e       cmd_op,
  input  logic [AW-1:0] addr_a,
  input  logic [AW-1:0] addr_b,
  input  logic [AW-1:0] addr_c,
  output logic          busy,
  output logic          done,
  // system memory, port A (read, one cycle latency)
  output logic [AW-1:0] mem_addr_a,
  input  logic [63:0]   mem_rdata_a,
  // system memory, port B (write per 16-bit lane)
  output logic [AW-1:0] mem_addr_b,
  output logic [3:0]    mem_we_b,
  output logic [63:0]   mem_wdata_b
);

  typedef enum logic [2:0] {T_IDLE, T_EVAL, T_MUL_GO, T_MUL_WAIT, T_INTERP} tstate_e;
  tstate_e state;

  logic [AW-1:0] base_a, base_b, base_c;
  logic          mac_q;

  // ------------------------------------------------------------ seven schb64 units
  logic          ld_a_we, ld_b_we, mul_start;
  logic [5:0]    ld_addr;
  coef_t         ld_data [NPTS];
  logic [6:0]    rd_addr;
  coef_t         rd_data [NPTS];
  logic [NPTS-1:0] sb_busy, sb_done;

  for (genvar k = 0; k < NPTS; k++) begin : g_schb
    schb64 #(.NM(NM)) u_schb (
      .clk, .rst_n,
      .ld_a_we, .ld_b_we, .ld_addr, .ld_data(ld_data[k]),
      .start(mul_start), .mac(mac_q), .busy(sb_busy[k]), .done(sb_done[k]),
      .rd_addr, .rd_data(rd_data[k]));
  end

  // ------------------------------------------------------------ evaluation
  logic [7:0] ecnt;              // 0..63 operand a, 64..127 operand b, 128 end
  logic       e_rd_v;            // read issued last cycle, data on mem_rdata_a
  logic [6:0] e_rd_idx, e_out_idx;
  logic       ev_out_valid;
  coef_t      ev_in  [4];
  coef_t      ev_out [NPTS];

  always_comb
    for (int l = 0; l < 4; l++) ev_in[l] = mem_rdata_a[16*l +: 16];

  tc_eval u_eval (
    .clk, .rst_n, .in_valid(e_rd_v), .a(ev_in), .out_valid(ev_out_valid), .aw(ev_out));

  assign mem_addr_a = ecnt[6] ? (base_b + AW'(ecnt[5:0])) : (base_a + AW'(ecnt[5:0]));
  assign ld_a_we    = ev_out_valid && !e_out_idx[6];
  assign ld_b_we    = ev_out_valid &&  e_out_idx[6];
  assign ld_addr    = e_out_idx[5:0];
  assign ld_data    = ev_out;

  // ------------------------------------------------------------ interpolation
  logic [9:0] icnt;              // 8 cycles per pair of iterations (p, p+64)
  logic       i_feed;
  coef_t      ip_in  [NPTS];
  coef_t      ip_out [NPTS];
  logic       ip_out_valid;
  logic       second;            // next interpolation output is iteration p+64
  coef_t      hold [NPTS];       // row of iteration p
  coef_t      sums [8];          // final coefficients p + 64*j
  logic       w_act;
  logic [2:0] wcnt;
  logic [5:0] wp;
  logic [8:0] wk;
  logic [8:0] wpos;

  assign i_feed  = (state == T_INTERP) && (icnt[2:1] == 2'b00) && !icnt[9];
  assign rd_addr = {icnt[0], icnt[8:3]};     // p, then p+64
  always_comb
    for (int k = 0; k < NPTS; k++) ip_in[k] = (rd_addr == 7'd127) ? '0 : rd_data[k];

  tc_interp u_interp (
    .clk, .rst_n, .in_valid(i_feed), .w(ip_in), .out_valid(ip_out_valid), .out(ip_out));

  assign wk   = {wcnt, wp};                  // coefficient p + 64*j
  assign wpos = coef_pos(wk);
  assign mem_addr_b  = base_c + AW'(wpos[8:2]);
  assign mem_we_b    = w_act ? (4'b0001 << wpos[1:0]) : 4'b0000;
  assign mem_wdata_b = {4{sums[wcnt] & coef_t'((1 << LOGQ) - 1)}};

  // ------------------------------------------------------------ control
  assign busy = (state != T_IDLE);
  assign done = ((state == T_EVAL) && ev_out_valid && e_out_idx == 7'd127) ||
                ((state == T_MUL_WAIT) && (&sb_done)) ||
                ((state == T_INTERP) && w_act && wcnt == 3'd7 && wp == 6'd63);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      base_a    <= '0;
      base_b    <= '0;
      base_c    <= '0;
      mac_q     <= 1'b0;
      ecnt      <= '0;
      e_rd_v    <= 1'b0;
      e_rd_idx  <= '0;
      e_out_idx <= '0;
      mul_start <= 1'b0;
      icnt      <= '0;
      second    <= 1'b0;
      w_act     <= 1'b0;
      wcnt      <= '0;
      wp        <= '0;
      for (int k = 0; k < NPTS; k++) hold[k] <= '0;
      for (int k = 0; k < 8; k++) sums[k] <= '0;
    end else begin
      mul_start <= 1'b0;
      // evaluation read pipeline: address -> memory data -> aw registers
      e_rd_v   <= (state == T_EVAL) && !ecnt[7];
      e_rd_idx <= ecnt[6:0];
      if (e_rd_v) e_out_idx <= e_rd_idx;

      unique case (state)
        T_IDLE: if (cmd_valid) begin
          base_a <= addr_a;
          base_b <= addr_b;
          base_c <= addr_c;
          unique case (cmd_op)
            CMD_EVAL: begin
              state <= T_EVAL;
              ecnt  <= '0;
            end
            CMD_MUL, CMD_MAC: begin
              state <= T_MUL_GO;
              mac_q <= (cmd_op == CMD_MAC);
            end
            CMD_INTERP: begin
              state  <= T_INTERP;
              icnt   <= '0;
              second <= 1'b0;
              wp     <= '0;
              w_act  <= 1'b0;
            end
            default: ;
          endcase
        end
        T_EVAL: begin
          if (!ecnt[7]) ecnt <= ecnt + 8'd1;
          if (done) state <= T_IDLE;
        end
        T_MUL_GO: begin
          mul_start <= 1'b1;
          state     <= T_MUL_WAIT;
        end
        T_MUL_WAIT: if (done) state <= T_IDLE;
        T_INTERP: begin
          if (!icnt[9]) icnt <= icnt + 10'd1;
          if (w_act) begin
            wcnt <= wcnt + 3'd1;
            if (wcnt == 3'd7) begin
              w_act <= 1'b0;
              wp    <= wp + 6'd1;
            end
          end
          if (ip_out_valid) begin
            second <= !second;
            if (!second) hold <= ip_out;
            else begin
              sums[0] <= hold[0];
              for (int j = 1; j < NPTS; j++) sums[j] <= hold[j] + ip_out[j-1];
              sums[7] <= ip_out[NPTS-1];
              w_act   <= 1'b1;
              wcnt    <= '0;
            end
          end
          if (done) state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // the seven point-wise multipliers always run in lock step
  assert property (@(posedge clk) disable iff (!rst_n) (sb_busy == '0) || (sb_busy == '1));

endmodule
