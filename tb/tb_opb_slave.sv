// Testbench of opb_slave: an OPB master model performs random writes and
// reads in_win and outside the slave's window against a register file on
// the local bus. Checks: one local strobe per transfer with the right
// address, direction and data; xferAck exactly one cycle after the transfer
// is presented; read data equal to what was written; zeros on the data bus
// outside the acknowledge cycle; no response outside the window.
module tb_opb_slave;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] abus = 0, dbus = 0, sl_dbus, wdata, rdata;
  logic rnw = 1, select = 0, xferack, errack, retry, toutsup, acc, we;
  logic [11:0] addr;
  int checks = 0, failures = 0, n_acc = 0;
  logic [31:0] regs [1024];

  opb_slave #(.BASE_ADDR(32'h8000_0000), .ADDR_BITS(12)) dut (
    .clk, .rst_n, .opb_abus(abus), .opb_be(4'hF), .opb_dbus(dbus), .opb_rnw(rnw),
    .opb_select(select), .opb_seqaddr(1'b0), .sl_dbus, .sl_xferack(xferack),
    .sl_errack(errack), .sl_retry(retry), .sl_toutsup(toutsup),
    .acc, .we, .addr, .wdata, .rdata);

  // local register file, read data one cycle after the strobe
  always_ff @(posedge clk) begin
    if (acc && we) regs[addr[11:2]] <= wdata;
    if (acc && !we) rdata <= regs[addr[11:2]];
    if (acc) n_acc++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(logic [31:0] a, bit read, logic [31:0] d, output logic [31:0] q, output int cyc);
    cyc = 0;
    @(negedge clk);
    abus = a; rnw = read; dbus = read ? 0 : d; select = 1;
    #1;
    check(!xferack && sl_dbus == 0, "quiet before acknowledge");
    while (!xferack && cyc < 8) begin @(negedge clk); cyc++; #1; end
    q = sl_dbus;
    @(negedge clk);
    select = 0; abus = 0; dbus = 0;
    #1;
    check(!xferack && sl_dbus == 0, "quiet after acknowledge");
  endtask

  initial begin
    logic [31:0] model [1024];
    logic [31:0] q;
    int cyc, n0;
    foreach (regs[i]) begin regs[i] = 0; model[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      automatic int r = $urandom_range(15);
      automatic bit rd = $urandom_range(1);
      automatic logic [31:0] d = $urandom;
      automatic bit in_win = ($urandom_range(9) != 0);
      automatic logic [31:0] a = (in_win ? 32'h8000_0000 : 32'h8000_1000) | (r << 2);
      n0 = n_acc;
      xfer(a, rd, d, q, cyc);
      if (in_win) begin
        check(cyc == 1, $sformatf("acknowledge after %0d cycles", cyc));
        check(n_acc == n0 + 1, "exactly one local strobe");
        if (rd) check(q == model[r], "read data");
        else model[r] = d;
      end else begin
        check(cyc == 8 && n_acc == n0, "no response outside window");
      end
    end
    check(!errack && !retry && !toutsup, "no error/retry/timeout suppress");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
