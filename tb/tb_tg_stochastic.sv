// Testbench of tg_stochastic: programs the three traffic models through
// the register port, collects the injected packets from the link and checks
// them against the reference packet layout and CRC, the programmed length
// and destination ranges, the packet limit, the sent counters, the burst
// spacing (len+1 cycles inside a burst, at least GAP between bursts), the
// burst delivery times, and
// the mean and spread of the gaps of the normal model.
module tb_tg_stochastic;
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

  tg_stochastic dut (.clk, .rst_n, .node_id(node_t'(2)), .bc, .now, .sel, .we,
                     .addr, .wdata, .rdata, .done, .link_o, .ready_i);

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
  task automatic pulse_clr();
    @(negedge clk); bc.clr = 1; @(negedge clk); bc.clr = 0;
  endtask

  // packet collector
  logic [31:0] cur[$];
  int n_pkt = 0, n_flit = 0, lmin, lmax, dlo, dhi;
  int head_t[$], lens[$];
  always @(negedge clk) ready_i <= ($urandom_range(99) >= stall);
  always @(posedge clk) if (rst_n && link_o.valid && ready_i) begin
    n_flit++;
    if (link_o.flit.head) begin cur = {}; head_t.push_back(int'(now)); end
    cur.push_back(link_o.flit.data);
    if (link_o.flit.tail) begin
      logic [31:0] body[$];
      int d, s, l;
      body = cur[0:cur.size()-2];
      d = int'(cur[0][31:22]); s = int'(cur[0][21:12]); l = int'(cur[0][11:6]);
      check(cur[cur.size()-1] == crc_words(body), "crc");
      check(l == cur.size(), "length field matches flits");
      check(l >= lmin && l <= lmax, $sformatf("length %0d in range", l));
      check(d >= dlo && d <= dhi, $sformatf("dest %0d in range", d));
      check(s == 2, "source id");
      lens.push_back(l);
      n_pkt++;
    end
  end

  task automatic run_until_done(int maxc);
    int c = 0;
    bc.run = 1;
    while (!done && c < maxc) begin @(negedge clk); c++; end
    repeat (5) @(negedge clk);
    bc.run = 0;
    check(done, "done reached");
  endtask

  initial begin
    logic [31:0] v;
    int fl;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pulse_clr();

    // uniform, 25 % rate, lengths 3..8, random dest 4..7, with stalls
    lmin = 3; lmax = 8; dlo = 4; dhi = 7; stall = 30;
    wr(1, 16384); wr(2, (8 << 8) | 3); wr(3, (3 << 16) | 4); wr(4, 200);
    wr(0, 32'b1001);
    run_until_done(40000);
    check(n_pkt == 200, $sformatf("200 packets, got %0d", n_pkt));
    rd(6, v); check(v == 200, "pkt_sent register");
    rd(7, v); check(v == n_flit, $sformatf("flit_sent register %0d vs %0d", v, n_flit));
    fl = 0; foreach (lens[i]) fl += (lens[i] == 3) + (lens[i] == 8);
    check(fl > 20, "both length bounds drawn");
    rd(8, v); check(v[0] == 1, "status done");

    // bursts of 4 packets of length 5 to node 9, gap 50
    pulse_clr();
    rd(6, v); check(v == 0, "counters cleared");
    n_pkt = 0; n_flit = 0; head_t = {}; lens = {};
    lmin = 5; lmax = 5; dlo = 9; dhi = 9; stall = 0;
    wr(2, (5 << 8) | 5); wr(3, 9); wr(4, 12); wr(5, (50 << 16) | 4);
    wr(0, 32'b0011);
    run_until_done(5000);
    check(n_pkt == 12, "12 burst packets");
    for (int i = 1; i < head_t.size(); i++) begin
      automatic int sp = head_t[i] - head_t[i-1];
      if (i % 4 != 0) check(sp == 6, $sformatf("in-burst spacing %0d", sp));
      else            check(sp >= 50 && sp <= 60, $sformatf("burst gap %0d", sp));
    end

    rd(9, v);  check(v == 25, $sformatf("burst delivery time %0d (4 x 6 + 1)", v));
    rd(10, v); check(v == 75, "sum of burst delivery times");
    rd(11, v); check(v == 3, "bursts delivered");

    // normal-like gaps: base 10, scale 0 -> mean gap 40
    pulse_clr();
    n_pkt = 0; n_flit = 0; head_t = {}; lens = {};
    lmin = 3; lmax = 3; dlo = 1; dhi = 1;
    wr(2, (3 << 8) | 3); wr(3, 1); wr(4, 300); wr(5, 10);
    wr(0, 32'b0101);
    run_until_done(30000);
    check(n_pkt == 300, "300 normal packets");
    begin
      real m = 0, v2 = 0; int mn = 1000;
      for (int i = 1; i < head_t.size(); i++) begin
        automatic int sp = head_t[i] - head_t[i-1];
        m += sp; v2 += sp * sp; if (sp < mn) mn = sp;
      end
      m /= (head_t.size() - 1);
      v2 = v2 / (head_t.size() - 1) - m * m;
      $display("normal model: mean spacing %f, variance %f, min %0d", m, v2, mn);
      check(m > 38.0 && m < 46.0, "mean spacing");
      check(v2 > 30.0 && v2 < 200.0, "spacing variance (4 uniform nibbles: 85)");
      check(mn >= 10, "no spacing below the base");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
