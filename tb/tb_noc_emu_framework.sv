// End-to-end testbench of noc_emu_framework at its default parameters
// (4 generators, 4 receptors, 115200-baud monitor at 50 MHz).
//
// A processor model on the OPB programs a stochastic emulation and a
// trace-driven one that run together over a behavioural network model,
// drains trace reports while they run, stops and restarts one group, then
// checks every statistic against what the network model delivered:
// packets sent = packets received, per-receptor packet counts, histogram
// totals, one CRC error from a corrupted packet, and each trace report
// record (source, length, latency). A second emulation after a group reset
// uses the normal-gap model. Finally a short report is sent through the
// monitor UART and decoded from the serial line. Each mechanism (the three
// stochastic models, trace injection, late injection, receptor
// back-pressure, CRC error detection, saturated histogram bin, debug
// capture, stop, reset, all-done status, UART output, burst delivery time) is counted and must
// occur at least once.
module tb_noc_emu_framework;
  import noc_emu_pkg::*;

  localparam int NTG = 4, NTR = 4, CPB = 434;
  localparam logic [31:0] PB = 32'h8000_0000, MB = 32'h4060_0000;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;               // 50 MHz
  stamp_t now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1'b1;

  logic [31:0] abus = 0, wdbus = 0, rdbus;
  logic [3:0]  be = 4'hF;
  logic        rnw = 1, select = 0, xferack, errack, retry, toutsup;
  logic        uart_tx, uart_rx = 1;
  link_t [NTG-1:0] tg_link;
  logic  [NTG-1:0] tg_ready;
  link_t [NTR-1:0] tr_link;
  logic  [NTR-1:0] tr_ready;
  logic corrupt_next = 0;
  int corrupted;
  int checks = 0, failures = 0;

  noc_emu_framework dut (
    .clk, .rst_n, .opb_abus(abus), .opb_be(be), .opb_wdbus(wdbus), .opb_rnw(rnw),
    .opb_select(select), .opb_seqaddr(1'b0), .opb_rdbus(rdbus), .opb_xferack(xferack),
    .opb_errack(errack), .opb_retry(retry), .opb_toutsup(toutsup),
    .uart_tx, .uart_rx, .tg_link_o(tg_link), .tg_ready_i(tg_ready),
    .tr_link_i(tr_link), .tr_ready_o(tr_ready));

  tb_noc_model #(.NI(NTG), .NO(NTR), .MAX_DELAY(20), .STALL_PCT(20)) net (
    .clk, .rst_n, .now, .in_link(tg_link), .in_ready(tg_ready),
    .out_link(tr_link), .out_ready(tr_ready), .corrupt_next, .corrupted);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- processor model
  task automatic opb(logic [31:0] a, bit read, logic [31:0] d, output logic [31:0] q);
    int c = 0;
    @(negedge clk);
    abus = a; rnw = read; wdbus = read ? 0 : d; select = 1;
    #1;
    while (!xferack && c < 16) begin @(negedge clk); c++; #1; end
    if (!xferack) begin failures++; $display("FAIL: OPB timeout at %h", a); end
    q = rdbus;
    @(negedge clk);
    select = 0;
  endtask
  function automatic logic [31:0] tg(int n, int r);   return PB | (n << 8) | (r << 2); endfunction
  function automatic logic [31:0] tr(int n, int r);   return PB | ((512 + n) << 8) | (r << 2); endfunction
  function automatic logic [31:0] ctl(int k, int r);  return PB | ((1024 + k) << 8) | (r << 2); endfunction
  task automatic wr(logic [31:0] a, logic [31:0] d);
    logic [31:0] q; opb(a, 0, d, q);
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] q);
    opb(a, 1, 0, q);
  endtask

  // mechanism counters
  int m_uniform, m_burst, m_normal, m_trace, m_late, m_backpressure, m_crc,
      m_satbin, m_debug, m_stop, m_reset, m_alldone, m_uart, m_bursttime;
  always @(posedge clk) if (rst_n) for (int j = 0; j < NTR; j++)
    if (tr_link[j].valid && !tr_ready[j]) m_backpressure++;

  // trace report records read so far, per trace receptor
  logic [31:0] rep_desc [NTR][$], rep_lat [NTR][$];
  task automatic drain_reports();
    logic [31:0] n, dsc, lat;
    for (int j = 2; j < 4; j++) begin
      rd(tr(j, 10), n);
      for (int k = 0; k < int'(n); k++) begin
        rd(tr(j, 8), dsc); rd(tr(j, 9), lat);
        rep_desc[j].push_back(dsc); rep_lat[j].push_back(lat);
      end
    end
  endtask

  // serial decoder for the monitor output
  byte uart_rx_bytes[$];
  initial forever begin
    byte b;
    @(negedge uart_tx);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_tx; end
    repeat (CPB) @(posedge clk);
    if (uart_tx) uart_rx_bytes.push_back(b);
  end

  initial begin
    logic [31:0] v, t0, sent_tot, rcv_tot, hsum;
    int trace_n = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    wr(ctl(0, 0), 4); wr(ctl(1, 0), 4);

    // stochastic group: TG0 uniform to random nodes 0..3, TG1 bursts to node 2
    wr(tg(0, 1), 12000); wr(tg(0, 2), (12 << 8) | 3); wr(tg(0, 3), 3 << 16);
    wr(tg(0, 4), 40); wr(tg(0, 0), 32'b1001);
    wr(tg(1, 2), (6 << 8) | 6); wr(tg(1, 3), 2); wr(tg(1, 4), 12);
    wr(tg(1, 5), (40 << 16) | 4); wr(tg(1, 0), 32'b0011);
    wr(tr(0, 0), (4 << 8) | 2);           // 16-cycle bins, debug capture on
    wr(tr(1, 0), 4 << 8);
    // trace group: TG2 and TG3 replay descriptors (some too close: late)
    wr(tg(2, 0), 1); wr(tg(3, 0), 1 | (1 << 4));
    for (int i = 0; i < 12; i++) begin
      wr(tg(2, 1), (32'($urandom_range(3, 10)) << 26) | (32'(i % 4) << 16) | 32'((i % 3 == 0) ? 2 : 40));
      wr(tg(3, 1), (32'($urandom_range(3, 10)) << 26) | (32'(2 + i % 2) << 16) | 32'(25));
      trace_n += 2;
    end
    rd(tg(2, 1), v); check(v == 4, "trace FIFO free entries");
    corrupt_next = 1;

    wr(ctl(0, 0), 1); wr(ctl(1, 0), 1);   // start both groups
    m_uniform++; m_burst++; m_trace++;
    repeat (200) @(negedge clk);
    wr(ctl(0, 0), 2);                     // stop the stochastic group for a while
    rd(ctl(0, 1), t0);
    repeat (100) @(negedge clk);
    rd(ctl(0, 1), v); check(v == t0, "emulation time frozen while stopped");
    if (v == t0) m_stop++;
    rd(ctl(0, 0), v); check(v[0] == 0, "group stopped");
    wr(ctl(0, 0), 1);
    // wait for both groups, draining trace reports meanwhile
    for (int w = 0; w < 400; w++) begin
      logic [31:0] s0, s1;
      repeat (100) @(negedge clk);
      drain_reports();
      rd(ctl(0, 0), s0); rd(ctl(1, 0), s1);
      if (s0[1] && s1[1] && net.delivered == net.accepted_pkts) break;
    end
    repeat (50) @(negedge clk);
    drain_reports();
    rd(ctl(0, 0), v); check(v[1], "stochastic group all done"); if (v[1]) m_alldone++;
    rd(ctl(1, 0), v); check(v[1], "trace group all done");

    // totals
    sent_tot = 0; rcv_tot = 0;
    for (int i = 0; i < NTG; i++) begin rd(tg(i, (i < 2) ? 6 : 2), v); sent_tot += v; end
    for (int j = 0; j < NTR; j++) begin
      rd(tr(j, 1), v); rcv_tot += v;
      check(v == net.dlog[j].size(), $sformatf("TR%0d packets %0d vs %0d", j, v, net.dlog[j].size()));
    end
    check(sent_tot == 40 + 12 + trace_n, $sformatf("packets sent %0d", sent_tot));
    check(rcv_tot == sent_tot, "every packet received");
    begin
      int crc_tot = 0;
      for (int j = 0; j < NTR; j++) begin rd(tr(j, 3), v); crc_tot += v; end
      check(corrupted == 1 && crc_tot == 1, "one corrupted packet detected");
      if (crc_tot == 1) m_crc++;
    end
    rd(tg(1, 11), v); check(v == 3, $sformatf("three bursts delivered, %0d", v)); m_bursttime = v;
    rd(tg(1, 9), v); check(v >= 4 * 7 + 1, "burst delivery time at least 4 x (6 + 1) + 1");
    rd(tg(2, 5), v); check(v >= 1, $sformatf("late trace injections %0d", v)); if (v > 0) m_late += v;
    // histograms add up to the flit count
    for (int j = 0; j < 2; j++) begin
      logic [31:0] fl, last;
      hsum = 0;
      for (int b = 0; b < 16; b++) begin rd(tr(j, 32 + b), v); hsum += v; if (b == 15) last = v; end
      rd(tr(j, 2), fl);
      check(hsum == fl, $sformatf("TR%0d histogram sum %0d vs flits %0d", j, hsum, fl));
      if (last > 0) m_satbin++;
    end
    // debug capture of TR0: first captured flit is a header for node 0
    rd(tr(0, 7), v); check(v == 16, "debug FIFO filled");
    rd(tr(0, 6), v); check(v[31:22] == 0 && v[11:6] >= 3, "captured header");
    if (v[31:22] == 0) m_debug++;
    // trace reports against the network's delivery log
    for (int j = 2; j < 4; j++) begin
      check(rep_desc[j].size() == net.dlog[j].size(), $sformatf("TR%0d report count", j));
      foreach (rep_desc[j][k]) if (k < net.dlog[j].size()) begin
        automatic stamp_t lat = stamp_t'(net.dlog[j][k].t_tail) + 1 - net.dlog[j][k].stamp;
        check(rep_desc[j][k][25:16] == net.dlog[j][k].src, "report source");
        check(rep_desc[j][k][31:26] == net.dlog[j][k].len, "report length");
        check(rep_lat[j][k] == lat, $sformatf("report latency %0d vs %0d", rep_lat[j][k], lat));
      end
    end

    // second emulation: reset the stochastic group, normal-gap model on TG1
    wr(ctl(0, 0), 4);
    rd(tr(0, 1), v); check(v == 0, "reset clears receptor statistics");
    rd(tg(1, 6), v); check(v == 0, "reset clears generator statistics");
    if (v == 0) m_reset++;
    wr(tg(0, 0), 0);
    wr(tg(1, 3), 1); wr(tg(1, 4), 20); wr(tg(1, 5), 8); wr(tg(1, 0), 32'b0101);
    wr(ctl(0, 0), 1); m_normal++;
    for (int w = 0; w < 100; w++) begin
      repeat (100) @(negedge clk);
      rd(ctl(0, 0), v);
      if (v[1]) break;
    end
    repeat (100) @(negedge clk);
    rd(tr(1, 1), v); check(v == 20, $sformatf("normal model: 20 packets at TR1, got %0d", v));
    rd(ctl(0, 1), v); check(v > 20 * 20, "normal model gaps stretch the run");

    // report through the monitor
    begin
      string s = "OK\n";
      for (int i = 0; i < 3; i++) wr(MB | 4, 32'(s[i]));
      wait (uart_rx_bytes.size() == 3);
      for (int i = 0; i < 3; i++) check(uart_rx_bytes[i] == s[i], "monitor character");
      m_uart = uart_rx_bytes.size();
    end

    $display("mechanisms: uniform=%0d burst=%0d normal=%0d trace=%0d late=%0d backpressure=%0d crc=%0d satbin=%0d debug=%0d stop=%0d reset=%0d alldone=%0d uart=%0d bursttime=%0d",
             m_uniform, m_burst, m_normal, m_trace, m_late, m_backpressure, m_crc,
             m_satbin, m_debug, m_stop, m_reset, m_alldone, m_uart, m_bursttime);
    check(m_uniform > 0, "uniform model used");
    check(m_burst > 0, "burst model used");
    check(m_normal > 0, "normal model used");
    check(m_trace > 0, "trace injection used");
    check(m_late > 0, "late injection happened");
    check(m_backpressure > 0, "receptor back-pressure happened");
    check(m_crc > 0, "CRC error detected");
    check(m_satbin > 0, "last histogram bin used");
    check(m_debug > 0, "debug capture used");
    check(m_stop > 0, "stop used");
    check(m_reset > 0, "reset used");
    check(m_alldone > 0, "all-done seen");
    check(m_uart > 0, "UART output");
    check(m_bursttime > 0, "burst delivery times measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
