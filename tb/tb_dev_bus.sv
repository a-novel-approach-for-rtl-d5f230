// Testbench of dev_bus: every slot strobes only its own device, unknown
// slots strobe none, register bits pass through, and read data of the
// device addressed in the previous cycle (and only it) comes back.
module tb_dev_bus;
  import noc_emu_pkg::*;

  localparam int N = 5;
  localparam logic [N*11-1:0] SL = {11'd1025, 11'd1024, 11'd513, 11'd1, 11'd0};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic acc = 0, we = 0;
  logic [19:0] addr = 0;
  logic [N-1:0] dev_sel;
  logic [5:0] dev_addr;
  logic [N-1:0][31:0] dev_rdata;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  dev_bus #(.N_DEV(N), .SLOTS(SL)) dut (.clk, .rst_n, .acc, .we, .addr, .dev_sel,
                                        .dev_addr, .dev_rdata, .rdata);

  // devices answer with their index and register in the next cycle
  for (genvar i = 0; i < N; i++) begin : g_dev
    always_ff @(posedge clk) dev_rdata[i] <= 32'hA000_0000 | (i << 8) | dev_addr;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int slots[N] = '{0, 1, 513, 1024, 1025};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      automatic int i = $urandom_range(N);   // N means an empty slot
      automatic int s = (i == N) ? 700 : slots[i];
      automatic int r = $urandom_range(63);
      @(negedge clk);
      acc = 1; we = $urandom_range(1); addr = 20'((s << 8) | (r << 2));
      #1;
      check(dev_sel == ((i == N) ? '0 : (N'(1) << i)), $sformatf("select slot %0d", s));
      check(dev_addr == r, "register address");
      @(negedge clk);
      if (!we) check(rdata == ((i == N) ? 0 : (32'hA000_0000 | (i << 8) | r)),
                     $sformatf("read data slot %0d: %h", s, rdata));
      else     check(rdata == 0, "no read data after write");
      acc = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
