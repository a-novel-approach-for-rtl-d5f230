// Testbench of tg_trace: streams descriptors into the FIFO, runs the
// generator and checks every packet (destination, length, CRC) in trace
// order, the exact spacing of head flits (max(dt << shift, previous length
// + 2) cycles), the late counter, the FIFO free-space register, a push to a
// full FIFO being dropped, the done flag, and operation under link stalls.
module tb_tg_trace;
  import noc_emu_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stamp_t now = 0;
  always @(posedge clk) now <= now + 1;

  bcast_t bc = '0;
  logic sel = 0, we = 0, ready_i = 1, done;
  logic [5:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  link_t link_o;
  int checks = 0, failures = 0, stall = 0;

  tg_trace #(.FIFO_DEPTH(16)) dut (.clk, .rst_n, .node_id(node_t'(3)), .bc, .now,
                .sel, .we, .addr, .wdata, .rdata, .done, .link_o, .ready_i);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); sel = 1; we = 1; addr = 6'(a); wdata = d;
    @(negedge clk); sel = 0; we = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); sel = 1; we = 0; addr = 6'(a);
    @(negedge clk); sel = 0; d = rdata;
  endtask

  // expected trace
  int e_len[$], e_dest[$], e_dt[$];
  int head_t[$], got = 0;
  logic [31:0] cur[$];
  always @(negedge clk) ready_i <= ($urandom_range(99) >= stall);
  always @(posedge clk) if (rst_n && link_o.valid && ready_i) begin
    if (link_o.flit.head) begin cur = {}; head_t.push_back(int'(now)); end
    cur.push_back(link_o.flit.data);
    if (link_o.flit.tail) begin
      logic [31:0] body[$];
      body = cur[0:cur.size()-2];
      check(cur[cur.size()-1] == crc_words(body), "crc");
      check(got < e_len.size(), "no extra packet");
      if (got < e_len.size()) begin
        check(cur[0] == header(e_dest[got], 3, e_len[got]),
              $sformatf("header of packet %0d", got));
        check(cur.size() == e_len[got], "flit count");
      end
      got++;
    end
  end

  task automatic push(int len, int dest, int dt);
    e_len.push_back(len); e_dest.push_back(dest); e_dt.push_back(dt);
    wr(1, (32'(len) << 26) | (32'(dest) << 16) | 32'(dt));
  endtask

  task automatic session(int n, int shift, bit do_stall);
    logic [31:0] v;
    int late_exp = 0, c = 0;
    e_len = {}; e_dest = {}; e_dt = {}; head_t = {}; got = 0;
    @(negedge clk); bc.clr = 1; @(negedge clk); bc.clr = 0;
    stall = do_stall ? 40 : 0;
    wr(0, (shift << 4) | 1);
    for (int i = 0; i < n; i++)
      push($urandom_range(3, 12), $urandom_range(1023), $urandom_range(0, 30));
    rd(1, v); check(v == 16 - n, "free entries");
    bc.run = 1;
    while (!(done && got == n) && c < 20000) begin @(negedge clk); c++; end
    bc.run = 0;
    check(got == n, $sformatf("%0d packets sent, got %0d", n, got));
    check(done, "done");
    if (!do_stall) begin
      for (int i = 1; i < n; i++) begin
        automatic int want = e_dt[i] << shift;
        automatic int minsp = e_len[i-1] + 2;
        if (want < minsp) begin want = minsp; late_exp++; end
        check(head_t[i] - head_t[i-1] == want,
              $sformatf("spacing %0d: got %0d want %0d", i, head_t[i] - head_t[i-1], want));
      end
      rd(5, v); check(v == late_exp, $sformatf("late count %0d vs %0d", v, late_exp));
    end
    rd(2, v); check(v == n, "pkt_sent register");
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    session(12, 0, 0);
    session(10, 2, 0);
    session(14, 0, 1);
    // overflow: 17 pushes, 16 kept
    @(negedge clk); bc.clr = 1; @(negedge clk); bc.clr = 0;
    for (int i = 0; i < 17; i++) wr(1, 32'h0C00_0001);
    rd(1, v); check(v == 0, "FIFO full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
