// Testbench of monitor_uart (shortened bit time): an OPB master model
// writes characters to the transmit register; a serial decoder in the
// testbench checks start bit, eight data bits LSB first, stop bit and the
// bit period on uart_tx. The line is looped back to uart_rx and the
// received characters are read back over the OPB in order. Also checks the
// status bits and that the slave ignores addresses outside its window.
module tb_monitor_uart;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] abus = 0, dbus = 0, sl_dbus;
  logic rnw = 1, select = 0, xferack, errack, retry, toutsup, tx;
  int checks = 0, failures = 0;
  byte sent[$], decoded[$];
  time starts[$];

  monitor_uart #(.BASE_ADDR(32'h4060_0000), .CLKS_PER_BIT(CPB), .FIFO_DEPTH(16)) dut (
    .clk, .rst_n, .opb_abus(abus), .opb_be(4'hF), .opb_dbus(dbus), .opb_rnw(rnw),
    .opb_select(select), .opb_seqaddr(1'b0), .sl_dbus, .sl_xferack(xferack),
    .sl_errack(errack), .sl_retry(retry), .sl_toutsup(toutsup),
    .uart_tx(tx), .uart_rx(tx));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic opb(logic [31:0] a, bit read, logic [31:0] d, output logic [31:0] q);
    int c = 0;
    @(negedge clk);
    abus = a; rnw = read; dbus = read ? 0 : d; select = 1;
    #1;
    while (!xferack && c < 10) begin @(negedge clk); c++; #1; end
    check(xferack, "acknowledged");
    q = sl_dbus;
    @(negedge clk);
    select = 0;
  endtask

  // serial decoder on the transmit line
  initial begin
    forever begin
      byte b;
      @(negedge tx);
      starts.push_back($time);
      repeat (CPB / 2) @(posedge clk);
      check(tx == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      check(tx == 1, "stop bit");
      decoded.push_back(b);
    end
  end

  initial begin
    logic [31:0] q;
    string msg = "lat=42 pkts=1000\n";
    repeat (3) @(negedge clk);
    rst_n = 1;
    opb(32'h4060_0008, 1, 0, q);
    check(q[2] == 1 && q[0] == 0, "tx empty, nothing received");
    for (int i = 0; i < 12; i++) begin
      sent.push_back(msg[i]);
      opb(32'h4060_0004, 0, 32'(msg[i]), q);
    end
    wait (decoded.size() == 12);
    repeat (3 * CPB) @(negedge clk);
    foreach (sent[i]) check(decoded[i] == sent[i], $sformatf("decoded %0d", i));
    opb(32'h4060_0008, 1, 0, q);
    check(q[0] == 1 && q[1] == 0, "received data waiting");
    foreach (sent[i]) begin
      opb(32'h4060_0000, 1, 0, q);
      check(q[7:0] == sent[i], $sformatf("received %0d: %h", i, q[7:0]));
    end
    opb(32'h4060_0008, 1, 0, q);
    check(q[0] == 0, "receive FIFO empty");
    // characters queued back to back start every 10 bit times plus the
    // one idle cycle in which the next character is taken from the FIFO
    for (int i = 1; i < 12; i++)
      check(starts[i] - starts[i-1] == (10 * CPB + 1) * 10,
            $sformatf("character period %0t", starts[i] - starts[i-1]));
    // outside the window: no acknowledge
    @(negedge clk); abus = 32'h4060_0010; rnw = 1; select = 1;
    repeat (4) begin @(negedge clk); check(!xferack, "no ack outside window"); end
    select = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
