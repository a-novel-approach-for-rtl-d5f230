// Testbench of tr_trace: sends reference packets without reading the report
// FIFO until it fills, checks that the receptor then stops acknowledging
// flits (and resumes when records are read), and checks every report
// record (length, source, time since previous arrival, latency) against a
// model kept by the testbench, plus the record count and the statistics
// shared with the other receptor type.
module tb_tr_trace;
  import noc_emu_pkg::*;
  import tb_ref_pkg::*;

  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stamp_t now = 0;
  always @(posedge clk) now <= now + 1;

  bcast_t bc = '0;
  logic sel = 0, we = 0, ready_o, done;
  logic [5:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  link_t link_i = '0;
  int checks = 0, failures = 0, stalls = 0;

  tr_trace #(.REPORT_DEPTH(DEPTH)) dut (.clk, .rst_n, .node_id(node_t'(9)), .bc, .now,
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

  logic [31:0] e_desc[$], e_lat[$];
  stamp_t last_arr;

  // sender process: packets go out back to back, waiting while not ready
  int to_send = 0;
  initial begin
    forever begin
      wait (to_send > 0);
      begin
        logic [31:0] w[$];
        automatic int src = $urandom_range(1023), len = $urandom_range(3, 10);
        automatic stamp_t st = now - stamp_t'($urandom_range(0, 500));
        build(9, src, len, st, w);
        foreach (w[i]) begin
          @(negedge clk);
          link_i.valid = 1;
          link_i.flit = '{head: (i == 0), tail: (i == w.size() - 1), data: w[i]};
          #1;
          while (!ready_o) begin stalls++; @(negedge clk); #1; end
          if (i == w.size() - 1) begin
            automatic stamp_t arr = now + 1;
            automatic stamp_t gap = arr - last_arr;
            e_desc.push_back((32'(len) << 26) | (32'(src) << 16) |
                             ((gap > 65535) ? 32'hFFFF : gap));
            e_lat.push_back(arr - st);
            last_arr = arr;
          end
        end
        @(negedge clk);
        link_i = '0;
      end
      to_send--;
    end
  end

  task automatic drain(int n);
    logic [31:0] v, l;
    for (int i = 0; i < n; i++) begin
      rd(8, v); rd(9, l);
      check(e_desc.size() > 0, "record expected");
      if (e_desc.size() > 0) begin
        check(v == e_desc[0], $sformatf("descriptor %h vs %h", v, e_desc[0]));
        check(l == e_lat[0], $sformatf("latency %0d vs %0d", l, e_lat[0]));
        void'(e_desc.pop_front()); void'(e_lat.pop_front());
      end
    end
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); bc.clr = 1; last_arr = now; @(negedge clk); bc.clr = 0;
    to_send = DEPTH + 3;
    repeat (400) @(negedge clk);
    rd(10, v); check(v == DEPTH, "report FIFO full");
    check(stalls > 0, "receptor back-pressure while report FIFO full");
    check(to_send > 0, "sender blocked");
    drain(DEPTH);
    wait (to_send == 0);
    repeat (5) @(negedge clk);
    rd(10, v); check(v == 3, "three more records");
    drain(3);
    rd(8, v); check(v == 0, "empty FIFO reads zero");
    to_send = 20;
    while (to_send > 0) begin
      repeat (30) @(negedge clk);
      rd(10, v);
      drain(int'(v));
    end
    repeat (20) @(negedge clk);
    rd(10, v); drain(int'(v));
    check(e_desc.size() == 0, "all records read");
    rd(1, v); check(v == DEPTH + 23, "packet count");
    rd(3, v); check(v == 0, "no CRC errors");
    rd(4, v); check(v == 0, "no destination errors");
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
