// Testbench of opb_bus: random slave returns, one acknowledging slave at a
// time driving data (others zero, as OPB slaves must), and checks the
// master sees the OR of them all.
module tb_opb_bus;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0][31:0] d;
  logic [N-1:0] ack, err, rty, tos;
  logic [31:0] md;
  logic mack, merr, mrty, mtos;
  int checks = 0, failures = 0;

  opb_bus #(.N_SLV(N)) dut (.clk, .rst_n, .sl_dbus(d), .sl_xferack(ack),
    .sl_errack(err), .sl_retry(rty), .sl_toutsup(tos), .m_dbus(md),
    .m_xferack(mack), .m_errack(merr), .m_retry(mrty), .m_toutsup(mtos));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    d = '0; ack = '0; err = '0; rty = '0; tos = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      automatic int s = $urandom_range(N);     // N: nobody answers
      automatic logic [31:0] v = $urandom;
      @(negedge clk);
      d = '0; ack = '0;
      if (s < N) begin d[s] = v; ack[s] = 1; end
      err = N'($urandom); rty = N'($urandom); tos = N'($urandom);
      #1;
      check(md == ((s < N) ? v : 0), "data is the answering slave's");
      check(mack == (s < N), "acknowledge");
      check(merr == |err && mrty == |rty && mtos == |tos, "other returns ORed");
    end
    @(negedge clk); d = '0; ack = '0;
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
