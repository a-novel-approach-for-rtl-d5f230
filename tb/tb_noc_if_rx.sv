// Testbench of noc_if_rx: feeds reference packets (good, with a corrupted
// payload word, with a wrong destination, with a missing flit) with random
// gaps, and checks acknowledgement, per-flit pulses and the per-packet
// report (source, length, stamp, CRC/destination/length checks) one cycle
// after the tail.
module tb_noc_if_rx;
  import noc_emu_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, accept = 1;
  always #5 clk = ~clk;
  link_t link_i = '0;
  logic ready_o, flit_acc, pkt_done, crc_ok, dest_ok, len_ok;
  flit_t flit;
  node_t src;
  len_t plen;
  stamp_t stamp;
  int checks = 0, failures = 0, n_acc = 0;

  noc_if_rx dut (.clk, .rst_n, .clr, .my_id(node_t'(5)), .accept, .link_i,
                 .ready_o, .flit_acc, .flit, .pkt_done, .pkt_src(src),
                 .pkt_len(plen), .pkt_stamp(stamp), .pkt_crc_ok(crc_ok),
                 .pkt_dest_ok(dest_ok), .pkt_len_ok(len_ok));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (flit_acc) n_acc++;

  // kind: 0 good, 1 corrupt payload, 2 wrong destination, 3 drop a flit
  task automatic one(int kind);
    logic [31:0] w[$];
    int srcn = $urandom_range(1023), len = $urandom_range(4, 30);
    logic [31:0] st = $urandom;
    build((kind == 2) ? 6 : 5, srcn, len, st, w);
    if (kind == 1) w[2] ^= 32'h0000_0100;
    if (kind == 3) w.delete(2);
    foreach (w[i]) begin
      while ($urandom_range(3) == 0) begin link_i = '0; @(negedge clk); end
      accept = ($urandom_range(4) != 0);
      link_i.valid = 1;
      link_i.flit = '{head: (i == 0), tail: (i == w.size() - 1), data: w[i]};
      #1;
      check(ready_o == accept, "ready follows accept");
      check(flit_acc == accept, "flit_acc");
      check(flit.data == w[i], "flit data out");
      while (!accept) begin
        @(negedge clk);
        accept = ($urandom_range(4) != 0);
        #1;
      end
      @(negedge clk);
      if (i != w.size() - 1) check(!pkt_done, "no pkt_done mid-packet");
    end
    link_i = '0;
    check(pkt_done, "pkt_done after tail");
    check(src == node_t'(srcn), "source");
    check(plen == len_t'(len), "length");
    check(stamp == st, "stamp");
    check(crc_ok == (kind == 0 || kind == 2), $sformatf("crc_ok kind %0d", kind));
    check(dest_ok == (kind != 2), "dest_ok");
    check(len_ok == (kind != 3), "len_ok");
    @(negedge clk);
    check(!pkt_done, "pkt_done one cycle");
  endtask

  initial begin
    int total = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 40; i++) one(i % 4);
    check(n_acc > 40 * 4, "flits acknowledged");
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
