// Testbench of emu_platform with one device of each type (reduced size).
// Over the OPB it checks the address map (each device's configuration
// register reads back what was written to it and to no other), that the
// two control modules drive only their own kind of devices (starting the
// stochastic group leaves the trace generator idle), and a short run where
// node 0's stochastic generator sends to the histogram receptor and node 1's
// trace generator to the trace receptor, through a behavioural network,
// with the packet counts, the report record and the all-done status checked.
module tb_emu_platform;
  import noc_emu_pkg::*;

  localparam logic [31:0] PB = 32'h8000_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stamp_t now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1'b1;

  logic [31:0] abus = 0, wdbus = 0, rdbus;
  logic rnw = 1, select = 0, xferack, errack, retry, toutsup;
  link_t [1:0] tg_link, tr_link;
  logic  [1:0] tg_ready, tr_ready;
  int corrupted, checks = 0, failures = 0;

  emu_platform #(.BASE_ADDR(PB), .N_STG(1), .N_TTG(1), .N_HTR(1), .N_TTR(1)) dut (
    .clk, .rst_n, .opb_abus(abus), .opb_be(4'hF), .opb_dbus(wdbus), .opb_rnw(rnw),
    .opb_select(select), .opb_seqaddr(1'b0), .sl_dbus(rdbus), .sl_xferack(xferack),
    .sl_errack(errack), .sl_retry(retry), .sl_toutsup(toutsup),
    .tg_link_o(tg_link), .tg_ready_i(tg_ready), .tr_link_i(tr_link), .tr_ready_o(tr_ready));

  tb_noc_model #(.NI(2), .NO(2), .MAX_DELAY(5), .STALL_PCT(10)) net (
    .clk, .rst_n, .now, .in_link(tg_link), .in_ready(tg_ready),
    .out_link(tr_link), .out_ready(tr_ready), .corrupt_next(1'b0), .corrupted);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic opb(logic [31:0] a, bit read, logic [31:0] d, output logic [31:0] q);
    int c = 0;
    @(negedge clk);
    abus = a; rnw = read; wdbus = read ? 0 : d; select = 1;
    #1;
    while (!xferack && c < 16) begin @(negedge clk); c++; #1; end
    check(xferack, "acknowledged");
    q = rdbus;
    @(negedge clk);
    select = 0;
  endtask
  function automatic logic [31:0] A(int slot, int r); return PB | (slot << 8) | (r << 2); endfunction
  task automatic wr(logic [31:0] a, logic [31:0] d); logic [31:0] q; opb(a, 0, d, q); endtask
  task automatic rd(logic [31:0] a, output logic [31:0] q); opb(a, 1, 0, q); endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(A(1024, 0), 4); wr(A(1025, 0), 4);
    // address map: distinct values in a configuration register of each device
    wr(A(0, 4), 32'h11);       // stochastic TG0 NPKT
    wr(A(1, 0), 32'h31);       // trace TG1 CTRL: shift 3, enabled
    wr(A(512, 0), 32'h500);    // histogram TR0 gran 5
    wr(A(513, 0), 32'h2);      // trace TR1 debug on
    rd(A(0, 4), v);   check(v == 32'h11, "TG0 register");
    rd(A(1, 0), v);   check(v == 32'h31, "TG1 register");
    rd(A(512, 0), v); check(v == 32'h500, "TR0 register");
    rd(A(513, 0), v); check(v == 32'h2, "TR1 register");
    rd(A(2, 0), v);   check(v == 0, "empty slot reads zero");
    wr(A(1, 0), 32'h1);        // trace TG1 shift 0
    wr(A(513, 0), 0);
    // traffic: TG0 uniform to node 0, 10 packets; TG1 trace 3 packets to node 1
    wr(A(0, 1), 30000); wr(A(0, 2), (6 << 8) | 3); wr(A(0, 3), 0); wr(A(0, 4), 10);
    wr(A(0, 0), 1);
    for (int i = 0; i < 3; i++) wr(A(1, 1), (32'(4 + i) << 26) | (32'(1) << 16) | 32'(30));
    // only the stochastic group starts
    wr(A(1024, 0), 1);
    repeat (500) @(negedge clk);
    rd(A(1, 2), v); check(v == 0, "trace generator waits for its own control");
    rd(A(0, 6), v); check(v == 10, "stochastic generator ran");
    rd(A(512, 1), v); check(v == 10, "histogram receptor got 10 packets");
    rd(A(1024, 0), v); check(v == 32'b11, "stochastic group running and all done");
    rd(A(1025, 0), v); check(v == 32'b00, "trace group idle");
    wr(A(1025, 0), 1);
    repeat (300) @(negedge clk);
    rd(A(1, 2), v); check(v == 3, "trace generator sent 3");
    rd(A(513, 10), v); check(v == 3, "three report records");
    for (int i = 0; i < 3; i++) begin
      rd(A(513, 8), v);
      check(v[31:26] == 4 + i && v[25:16] == 1, $sformatf("record %0d: %h", i, v));
      rd(A(513, 9), v);
      check(v == stamp_t'(net.dlog[1][i].t_tail) + 1 - net.dlog[1][i].stamp, "record latency");
    end
    rd(A(1025, 0), v); check(v[1], "trace group all done");
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
