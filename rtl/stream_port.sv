// stream_port: connects the DMA data streams to port B of the system memory.
//
// The DMA moves polynomial arrays as a stream of 64-bit words with no address, so the
// host first tells the co-processor the base word address and the number of words (a
// transfer command), and this unit attaches consecutive addresses to the words.
//   load  (host -> memory): accepts len words on the slave stream (s_tvalid/s_tready,
//         one word per cycle, s_tready high while a load runs) and writes them to
//         base, base+1, ...; a word with s_tlast ends the load early.
//   store (memory -> host): reads len words from base on and sends them on the master
//         stream (m_tvalid/m_tready), m_tlast on the last word. A two-entry buffer
//         hides the one-cycle read latency of the memory, so a word leaves every cycle
//         while m_tready stays high, and back-pressure stalls the reads.
// Handshake: a word moves when valid and ready are both high in a cycle (AXI-Stream
// style; the stream protocol is this implementation's reading of "a stream, one data
// word each clock cycle"). busy is high during a transfer; done pulses in its last cycle.
// A loaded word is written in the cycle it is accepted, so mem_wdata is s_tdata itself,
// with no register in between.
module stream_port #(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_load,
  input  logic          start_store,
  input  logic [AW-1:0] base,
  input  logic [AW:0]   len,
  output logic          busy,
  output logic          done,
  // slave stream (from the DMA)
  input  logic          s_tvalid,
  output logic          s_tready,
  input  logic [63:0]   s_tdata,
  input  logic          s_tlast,
  // master stream (to the DMA)
  output logic          m_tvalid,
  input  logic          m_tready,
  output logic [63:0]   m_tdata,
  output logic          m_tlast,
  // system memory port B
  output logic [AW-1:0] mem_addr,
  output logic [3:0]    mem_we,
  output logic [63:0]   mem_wdata,
  input  logic [63:0]   mem_rdata
);

  typedef enum logic [1:0] {P_IDLE, P_LOAD, P_STORE} pstate_e;
  pstate_e state;

  logic [AW:0]   cnt_in;     // words written (load) / read requests issued (store)
  logic [AW:0]   cnt_out;    // words sent (store)
  logic [AW:0]   len_q;
  logic [AW-1:0] base_q;

  // store buffer
  logic [63:0] buf_q [2];
  logic        wptr, rptr;
  logic [1:0]  count;
  logic        inflight;
  logic        issue, pop;

  assign busy     = (state != P_IDLE);
  assign s_tready = (state == P_LOAD);

  assign pop      = m_tvalid && m_tready;
  assign issue    = (state == P_STORE) && (cnt_in < len_q) &&
                    ({1'b0, count} + {2'b0, inflight} - {2'b0, pop} < 3'd2);
  assign m_tvalid = (state == P_STORE) && (count != 2'd0);
  assign m_tdata  = buf_q[rptr];
  assign m_tlast  = m_tvalid && (cnt_out == len_q - 1'b1);

  assign mem_addr  = base_q + cnt_in[AW-1:0];
  assign mem_we    = (s_tvalid && s_tready) ? 4'b1111 : 4'b0000;
  assign mem_wdata = s_tdata;

  assign done = ((state == P_LOAD) && s_tvalid && (s_tlast || cnt_in == len_q - 1'b1)) ||
                ((state == P_STORE) && pop && m_tlast);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= P_IDLE;
      cnt_in   <= '0;
      cnt_out  <= '0;
      len_q    <= '0;
      base_q   <= '0;
      wptr     <= 1'b0;
      rptr     <= 1'b0;
      count    <= '0;
      inflight <= 1'b0;
      buf_q[0] <= '0;
      buf_q[1] <= '0;
    end else begin
      unique case (state)
        P_IDLE: begin
          cnt_in   <= '0;
          cnt_out  <= '0;
          wptr     <= 1'b0;
          rptr     <= 1'b0;
          count    <= '0;
          inflight <= 1'b0;
          len_q    <= len;
          base_q   <= base;
          if (len != '0) begin
            if (start_load)       state <= P_LOAD;
            else if (start_store) state <= P_STORE;
          end
        end
        P_LOAD: begin
          if (s_tvalid) cnt_in <= cnt_in + 1'b1;
          if (done) state <= P_IDLE;
        end
        P_STORE: begin
          inflight <= issue;
          if (issue) cnt_in <= cnt_in + 1'b1;
          if (inflight) begin
            buf_q[wptr] <= mem_rdata;
            wptr        <= !wptr;
          end
          if (pop) begin
            rptr    <= !rptr;
            cnt_out <= cnt_out + 1'b1;
          end
          count <= count + {1'b0, inflight} - {1'b0, pop};
          if (done) state <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  // stream rule: a master holds data stable while it waits for ready
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata));

endmodule
