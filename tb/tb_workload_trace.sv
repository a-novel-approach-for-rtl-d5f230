// Trace-driven workload on noc_emu_framework at its default parameters: a
// quarter of a 16-million-packet trace, with one packet every 10 clock
// cycles across the platform. The processor model streams 2,000,000
// packet descriptors into each of the two trace-driven generators while
// they run, reading the free FIFO space before each batch of pushes;
// packets of 3 to 6 flits leave each generator every 16 to 24 cycles (20
// on average, so 10 for the pair) for the two histogram receptors through
// a behavioural network. Checks: every packet received without CRC error,
// no late injection (the trace timing is kept exactly), emulation time
// equal to the sum of the relative times within a few cycles, 10 cycles
// per packet overall, the time a full 16-million-packet trace would take
// at 50 MHz (3.2 s), and a plausible average latency from the 64-bit
// latency sums.
module tb_workload_trace;
  import noc_emu_pkg::*;

  localparam int NPK = 2000000;
  localparam logic [31:0] PB = 32'h8000_0000;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  stamp_t now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1'b1;

  logic [31:0] abus = 0, wdbus = 0, rdbus;
  logic rnw = 1, select = 0, xferack, errack, retry, toutsup, uart_tx;
  link_t [3:0] tg_link, tr_link;
  logic  [3:0] tg_ready, tr_ready;
  int corrupted, checks = 0, failures = 0;

  noc_emu_framework dut (
    .clk, .rst_n, .opb_abus(abus), .opb_be(4'hF), .opb_wdbus(wdbus), .opb_rnw(rnw),
    .opb_select(select), .opb_seqaddr(1'b0), .opb_rdbus(rdbus), .opb_xferack(xferack),
    .opb_errack(errack), .opb_retry(retry), .opb_toutsup(toutsup),
    .uart_tx, .uart_rx(1'b1), .tg_link_o(tg_link), .tg_ready_i(tg_ready),
    .tr_link_i(tr_link), .tr_ready_o(tr_ready));

  tb_noc_model #(.NI(4), .NO(4), .MAX_DELAY(6), .STALL_PCT(0)) net (
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
    if (!xferack) begin failures++; $display("FAIL: OPB timeout"); end
    q = rdbus;
    @(negedge clk);
    select = 0;
  endtask
  function automatic logic [31:0] A(int slot, int r); return PB | (slot << 8) | (r << 2); endfunction
  task automatic wr(logic [31:0] a, logic [31:0] d); logic [31:0] q; opb(a, 0, d, q); endtask
  task automatic rd(logic [31:0] a, output logic [31:0] q); opb(a, 1, 0, q); endtask

  initial begin
    logic [31:0] v, free;
    longint dtsum[2] = '{0, 0};
    int pushed[2] = '{0, 0};
    int t_start;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wr(A(1025, 0), 4);
    wr(A(2, 0), 1); wr(A(3, 0), 1);
    // prefill both FIFOs, then start and keep them fed
    for (int g = 0; g < 2; g++)
      for (int k = 0; k < 16; k++) begin
        automatic int dt = $urandom_range(16, 24);
        wr(A(2 + g, 1), (32'($urandom_range(3, 6)) << 26) | (32'(k % 2) << 16) | 32'(dt));
        dtsum[g] += dt; pushed[g]++;
      end
    wr(A(1025, 0), 1);
    while (pushed[0] < NPK || pushed[1] < NPK) begin
      for (int g = 0; g < 2; g++) begin
        rd(A(2 + g, 1), free);
        for (int k = 0; k < int'(free) && pushed[g] < NPK; k++) begin
          automatic int dt = $urandom_range(16, 24);
          wr(A(2 + g, 1), (32'($urandom_range(3, 6)) << 26) | (32'(pushed[g] % 2) << 16) | 32'(dt));
          dtsum[g] += dt; pushed[g]++;
        end
      end
    end
    // wait for the trace group to finish and the network to drain
    do begin
      repeat (50) @(negedge clk);
      rd(A(1025, 0), v);
    end while (!(v[1] && net.delivered == net.accepted_pkts));
    wr(A(1025, 0), 2);
    begin
      logic [31:0] et, p0, p1, l0, l1, h0, h1, late0, late1, c0, c1;
      longint mx, lsum;
      real cpp;
      rd(A(1025, 1), et);
      rd(A(512, 1), p0); rd(A(513, 1), p1);
      rd(A(512, 5), l0); rd(A(513, 5), l1);
      rd(A(512, 11), h0); rd(A(513, 11), h1);
      lsum = {h0, l0} + {h1, l1};
      rd(A(512, 3), c0); rd(A(513, 3), c1);
      rd(A(2, 5), late0); rd(A(3, 5), late1);
      mx = (dtsum[0] > dtsum[1]) ? dtsum[0] : dtsum[1];
      cpp = real'(et) / real'(p0 + p1);
      $display("workload: %0d packets in %0d cycles (relative times sum to %0d / %0d), %0.2f cycles per packet, mean latency %0.1f cycles, 16e6 packets would take %0.2f s at 50 MHz",
               p0 + p1, et, dtsum[0], dtsum[1], cpp, real'(lsum) / real'(p0 + p1), cpp * 16.0e6 / 50.0e6);
      check(p0 + p1 == 2 * NPK, "all packets received");
      check(c0 + c1 == 0, "no CRC errors");
      check(late0 == 0 && late1 == 0, "trace timing kept (no late packets)");
      check(cpp > 9.8 && cpp < 10.2, "10 cycles per packet on average");
      check(cpp * 16.0e6 / 50.0e6 > 3.1 && cpp * 16.0e6 / 50.0e6 < 3.3, "16e6-packet trace in about 3.2 s at 50 MHz");
      check(et >= mx && et <= mx + 200, "emulation time follows the trace");
      check(real'(lsum) / real'(p0 + p1) < 25.0, "mean latency small in an unloaded network");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
