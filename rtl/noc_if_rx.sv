// NoC interface, receptor side: acknowledges flits and checks packets.
//
// Every flit offered while `accept` is high is acknowledged (ready_o).
// The header flit opens a packet: its destination, source and length are
// kept, the next flit is taken as the injection time stamp, and the CRC-32
// of all flits before the tail is compared with the tail flit. On the tail
// the interface reports the packet for one cycle on pkt_done with source,
// length, injection stamp and three checks: CRC match, destination equal to
// my_id, and flit count equal to the header length.
//
// Timing: flit_acc and the flit are valid in the cycle the flit is taken;
// pkt_done is registered, one cycle after the tail flit.
// The document gives the function (acknowledge flits, CRC check); the
// packet layout it checks is the one defined in noc_emu_pkg.
module noc_if_rx
  import noc_emu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr,
  input  node_t  my_id,
  input  logic   accept,
  input  link_t  link_i,
  output logic   ready_o,
  output logic   flit_acc,
  output flit_t  flit,
  output logic   pkt_done,
  output node_t  pkt_src,
  output len_t   pkt_len,
  output stamp_t pkt_stamp,
  output logic   pkt_crc_ok,
  output logic   pkt_dest_ok,
  output logic   pkt_len_ok
);

  logic        xfer;
  logic [31:0] crc;
  len_t        cnt;       // flits of the current packet taken so far
  node_t       dest_q;
  len_t        len_q;

  assign ready_o  = accept;
  assign xfer     = link_i.valid && accept;
  assign flit_acc = xfer;
  assign flit     = link_i.flit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc         <= CRC_INIT;
      cnt         <= '0;
      dest_q      <= '0;
      len_q       <= '0;
      pkt_done    <= 1'b0;
      pkt_src     <= '0;
      pkt_len     <= '0;
      pkt_stamp   <= '0;
      pkt_crc_ok  <= 1'b0;
      pkt_dest_ok <= 1'b0;
      pkt_len_ok  <= 1'b0;
    end else if (clr) begin
      crc      <= CRC_INIT;
      cnt      <= '0;
      pkt_done <= 1'b0;
    end else begin
      pkt_done <= 1'b0;
      if (xfer) begin
        if (link_i.flit.head) begin
          crc     <= crc32_word(CRC_INIT, link_i.flit.data);
          cnt     <= len_t'(1);
          dest_q  <= link_i.flit.data[31:22];
          pkt_src <= link_i.flit.data[21:12];
          len_q   <= link_i.flit.data[11:6];
        end else if (link_i.flit.tail) begin
          pkt_done    <= 1'b1;
          pkt_len     <= len_q;
          pkt_crc_ok  <= (crc == link_i.flit.data);
          pkt_dest_ok <= (dest_q == my_id);
          pkt_len_ok  <= (cnt + 1'b1 == len_q);
          cnt         <= '0;
        end else begin
          crc <= crc32_word(crc, link_i.flit.data);
          cnt <= cnt + 1'b1;
          if (cnt == 1) pkt_stamp <= link_i.flit.data;
        end
      end
    end
  end

endmodule
