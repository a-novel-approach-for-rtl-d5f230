// Testbench of tr_histogram: sends reference packets (some with a
// corrupted word, some for another node) while an emulation-time counter
// runs, and checks the packet, flit, CRC-error, destination-error and
// latency-sum registers and every histogram bin against a model kept by the
// testbench; then checks the debug capture FIFO and the group clear.
module tb_tr_histogram;
  import noc_emu_pkg::*;
  import tb_ref_pkg::*;

  localparam int NB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stamp_t now = 0;
  always @(posedge clk) now <= now + 1;

  bcast_t bc = '0;
  always @(posedge clk) if (bc.run) bc.etime <= bc.etime + 1;
  logic sel = 0, we = 0, ready_o, done;
  logic [5:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  link_t link_i = '0;
  int checks = 0, failures = 0;

  tr_histogram #(.N_BINS(NB)) dut (.clk, .rst_n, .node_id(node_t'(4)), .bc, .now,
                   .sel, .we, .addr, .wdata, .rdata, .done, .link_i, .ready_o);

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

  int gran = 5;
  int m_pkt = 0, m_flit = 0, m_crc = 0, m_err = 0;
  longint m_lat = 0;
  int m_hist[NB];

  task automatic send(int kind, int len);
    logic [31:0] w[$];
    stamp_t st = now - stamp_t'($urandom_range(0, 200));
    build((kind == 2) ? 7 : 4, $urandom_range(1023), len, st, w);
    if (kind == 1) w[w.size() - 1] ^= 32'h0001_0000;
    foreach (w[i]) begin
      while ($urandom_range(2) == 0) begin link_i = '0; @(negedge clk); end
      link_i.valid = 1;
      link_i.flit = '{head: (i == 0), tail: (i == w.size() - 1), data: w[i]};
      #1;
      check(ready_o, "always ready");
      begin
        automatic int b = int'(bc.etime >> gran);
        if (b > NB - 1) b = NB - 1;
        m_hist[b]++;
      end
      m_flit++;
      if (i == w.size() - 1) begin automatic stamp_t l = now + 1 - st; m_lat += l; end
      @(negedge clk);
    end
    link_i = '0;
    m_pkt++;
    if (kind == 1) m_crc++;
    if (kind == 2) m_err++;
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); bc.clr = 1; @(negedge clk); bc.clr = 0;
    wr(0, gran << 8);
    bc.run = 1;
    for (int i = 0; i < 60; i++) send((i % 7 == 3) ? 1 : (i % 11 == 5) ? 2 : 0, $urandom_range(3, 15));
    bc.run = 0;
    @(negedge clk); @(negedge clk);
    rd(1, v); check(v == m_pkt, "packets");
    rd(2, v); check(v == m_flit, $sformatf("flits %0d vs %0d", v, m_flit));
    rd(3, v); check(v == m_crc, $sformatf("crc errors %0d vs %0d", v, m_crc));
    rd(4, v); check(v == m_err, "dest errors");
    rd(5, v); check(v == m_lat[31:0], $sformatf("latency sum %0d vs %0d", v, m_lat));
    rd(11, v); check(v == m_lat[63:32], "latency sum, high word");
    for (int b = 0; b < NB; b++) begin
      rd(32 + b, v); check(v == m_hist[b], $sformatf("bin %0d: %0d vs %0d", b, v, m_hist[b]));
    end
    check(m_hist[NB-1] > 0 && m_hist[0] > 0, "first and saturated last bin used");
    check(done, "done when idle");

    // debug capture
    wr(0, 2);
    begin
      logic [31:0] w[$];
      build(4, 1, 6, now, w);
      foreach (w[i]) begin
        link_i.valid = 1;
        link_i.flit = '{head: (i == 0), tail: (i == w.size() - 1), data: w[i]};
        @(negedge clk);
      end
      link_i = '0;
      rd(7, v); check(v == 6, "debug FIFO holds 6 flits");
      foreach (w[i]) begin rd(6, v); check(v == w[i], "debug flit content"); end
      rd(7, v); check(v == 0, "debug FIFO emptied");
    end

    @(negedge clk); bc.clr = 1; @(negedge clk); bc.clr = 0;
    rd(2, v); check(v == 0, "flits cleared");
    rd(32, v); check(v == 0, "bins cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
