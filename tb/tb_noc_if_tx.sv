// Testbench of noc_if_tx: sends packets of several lengths with random
// back-pressure and checks every flit against the reference packet layout
// (header fields, injection stamp, payload count, CRC tail), the head/tail
// marks, the flit and packet pulses, and that a packet takes exactly len
// flit cycles plus the request cycle when the link never stalls.
module tb_noc_if_tx;
  import noc_emu_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0;
  always #5 clk = ~clk;
  stamp_t now = 0;
  always @(posedge clk) now <= now + 1;

  logic req_valid = 0, req_ready, ready_i = 1, flit_sent, pkt_sent;
  node_t req_dest = 0;
  len_t  req_len = 0;
  link_t link_o;
  int checks = 0, failures = 0;

  noc_if_tx dut (.clk, .rst_n, .clr, .src_id(node_t'(7)), .now, .req_valid,
                 .req_dest, .req_len, .req_ready, .link_o, .ready_i,
                 .flit_sent, .pkt_sent);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one packet and check it; stall = probability (%) of ready low
  task automatic one(int dest, int len, int stall, bit timed);
    logic [31:0] w[$];
    logic [31:0] stamp;
    int n_fs = 0, n_ps = 0, t0, exp_len;
    exp_len = (len < 3) ? 3 : len;
    @(negedge clk);
    req_valid = 1; req_dest = node_t'(dest); req_len = len_t'(len);
    check(req_ready, "req_ready while idle");
    stamp = now;
    t0 = now;
    @(negedge clk); req_valid = 0;
    while (w.size() < exp_len) begin
      ready_i = ($urandom_range(99) >= stall);
      #1;
      if (link_o.valid && ready_i) begin
        check(link_o.flit.head == (w.size() == 0), "head mark");
        check(link_o.flit.tail == (w.size() == exp_len - 1), "tail mark");
        check(flit_sent, "flit_sent pulse");
        n_fs++;
        if (pkt_sent) n_ps++;
        w.push_back(link_o.flit.data);
      end
      @(negedge clk);
    end
    ready_i = 1;
    check(w[0] == header(dest, 7, exp_len), $sformatf("header %h", w[0]));
    check(w[1] == stamp, "stamp");
    begin
      logic [31:0] body[$];
      body = w[0:exp_len-2];
      check(w[exp_len-1] == crc_words(body), "crc tail");
    end
    check(n_ps == 1, "one pkt_sent");
    if (timed) check(now - t0 == exp_len + 1, $sformatf("cycles %0d", now - t0));
    check(!link_o.valid && req_ready, "idle after packet");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    one(3, 3, 0, 1);
    one(5, 10, 0, 1);
    one(1, 2, 0, 1);          // raised to the minimum length
    one(1023, 63, 0, 1);
    for (int i = 0; i < 20; i++) one($urandom_range(1023), $urandom_range(3, 20), 40, 0);
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
