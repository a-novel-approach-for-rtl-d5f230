// Testbench of emu_control: start, stop and reset commands, the broadcast
// run/clr signals, the emulation-time counter (checked cycle by cycle
// against the number of cycles run), the done mask and the status register.
module tb_emu_control;
  import noc_emu_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sel = 0, we = 0;
  logic [5:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] dev_done = 0;
  bcast_t bc;
  int checks = 0, failures = 0, clr_seen = 0;

  emu_control #(.N_DEV(4)) dut (.clk, .rst_n, .sel, .we, .addr, .wdata, .rdata,
                                .dev_done, .bc);

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

  always @(posedge clk) if (bc.clr) clr_seen++;

  initial begin
    logic [31:0] v, t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!bc.run && bc.etime == 0, "idle after reset");
    wr(0, 1);
    check(bc.run, "run after start");
    repeat (100) @(negedge clk);
    check(bc.etime == 100, $sformatf("time counts run cycles: %0d", bc.etime));
    wr(0, 2);
    check(!bc.run, "stopped");
    t0 = bc.etime;
    repeat (20) @(negedge clk);
    check(bc.etime == t0, "time frozen while stopped");
    rd(1, v); check(v == t0, "time register");
    rd(3, v); check(v == 0, "time register, high word");
    rd(0, v); check(v == 32'b00, "status stopped, not done");
    dev_done = 4'b1011;
    rd(2, v); check(v == 4'b1011, "done mask");
    rd(0, v); check(v[1] == 0, "not all done");
    dev_done = 4'b1111;
    rd(0, v); check(v[1] == 1, "all done");
    wr(0, 1);
    rd(0, v); check(v[0] == 1, "status running");
    wr(0, 4);
    check(clr_seen == 1, "one clear pulse");
    check(!bc.run && bc.etime == 0, "reset stops and clears time");
    @(negedge clk);
    check(!bc.clr, "clear is one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
