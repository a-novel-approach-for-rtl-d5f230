// Behavioural stand-in for the network of switches under test, for
// testbenches only. Store-and-forward: each input link accepts flits (with
// random back-pressure), and a whole packet is queued for the receptor
// named by its header destination once its tail arrives, released after a
// random delay of up to MAX_DELAY cycles. Packets to one receptor leave in
// the order they were queued. When corrupt_next is set, one payload bit of
// the next packet with payload is flipped (to exercise CRC checking).
// Delivered packets are logged per receptor (source, length, injection
// stamp, delivery time of the tail) for the testbench to compare with.
module tb_noc_model
  import noc_emu_pkg::*;
#(
  parameter int NI = 4,
  parameter int NO = 4,
  parameter int MAX_DELAY = 20,
  parameter int STALL_PCT = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  stamp_t           now,
  input  link_t [NI-1:0]   in_link,
  output logic  [NI-1:0]   in_ready,
  output link_t [NO-1:0]   out_link,
  input  logic  [NO-1:0]   out_ready,
  input  logic             corrupt_next,
  output int               corrupted
);
  typedef struct { logic [31:0] w[$]; } pkt_t;
  typedef struct { int src; int len; logic [31:0] stamp; longint t_tail; } log_t;

  logic [31:0] inbuf [NI][$];
  flit_t       oq    [NO][$];
  longint      oq_t  [NO][$];
  log_t        dlog  [NO][$];
  int          cur_src[NO], cur_len[NO];
  logic [31:0] cur_stamp[NO];
  int          delivered = 0, accepted_pkts = 0;

  initial corrupted = 0;

  always @(negedge clk) begin
    for (int i = 0; i < NI; i++) in_ready[i] <= ($urandom_range(99) >= STALL_PCT);
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NI; i++) begin
      if (in_link[i].valid && in_ready[i]) begin
        if (in_link[i].flit.head) inbuf[i] = {};
        inbuf[i].push_back(in_link[i].flit.data);
        if (in_link[i].flit.tail) begin
          automatic int d = int'(inbuf[i][0][31:22]);
          automatic longint rel = longint'(now) + $urandom_range(0, MAX_DELAY);
          automatic int n = inbuf[i].size();
          if (corrupt_next && n > 3 && corrupted == 0) begin
            inbuf[i][2] ^= 32'h0000_0400;
            corrupted = 1;
          end
          if (d < NO) begin
            for (int k = 0; k < n; k++) begin
              oq[d].push_back('{head: (k == 0), tail: (k == n - 1), data: inbuf[i][k]});
              oq_t[d].push_back(rel);
            end
          end
          accepted_pkts++;
        end
      end
    end
    for (int j = 0; j < NO; j++) begin
      if (out_link[j].valid && out_ready[j]) begin
        automatic flit_t f = oq[j].pop_front();
        void'(oq_t[j].pop_front());
        if (f.head) begin
          cur_src[j] = int'(f.data[21:12]);
          cur_len[j] = 1;
        end else cur_len[j]++;
        if (cur_len[j] == 2) cur_stamp[j] = f.data;
        if (f.tail) begin
          dlog[j].push_back('{src: cur_src[j], len: cur_len[j], stamp: cur_stamp[j],
                              t_tail: longint'(now)});
          delivered++;
        end
      end
    end
  end

  always @(negedge clk) begin
    for (int j = 0; j < NO; j++) begin
      if (oq[j].size() > 0 && oq_t[j][0] <= longint'(now)) begin
        out_link[j].valid <= 1'b1;
        out_link[j].flit  <= oq[j][0];
      end else begin
        out_link[j] <= '0;
      end
    end
  end
endmodule
