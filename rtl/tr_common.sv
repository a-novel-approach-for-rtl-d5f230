// Part shared by both traffic receptor types.
//
// Holds the receptor's noc_if_rx and what both types provide: counters of
// packets and acknowledged flits, a count of packets failing the CRC check,
// a count of packets with a wrong destination or length, the sum of packet
// latencies (tail taken minus injection stamp, see noc_if_rx), and the
// manual debug mode: with dbg_en set, the data of every acknowledged flit is
// captured into a DBG_DEPTH-entry FIFO that the processor empties by reads
// (capture pauses while it is full).
//
// Register reads served here (word address): 1 packets, 2 flits, 3 CRC
// errors, 4 destination/length errors, 5 latency sum (low word), 6 pop
// debug FIFO, 7 debug FIFO fill, 11 latency sum (high word). The latency
// sum is 64 bits wide so that it cannot wrap in a run of 10^9 packets. rdata is combinational; the owner registers it.
// Packet events are passed on (pkt_done with source, length, latency) for
// the receptor's own statistics. bc.clr clears everything.
module tr_common
  import noc_emu_pkg::*;
#(
  parameter int DBG_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  node_t             node_id,
  input  bcast_t            bc,
  input  stamp_t            now,
  input  logic              accept,
  input  logic              dbg_en,
  input  logic              rd,          // read strobe for this device
  input  logic [REG_AW-1:0] addr,
  output logic [31:0]       rdata,
  input  link_t             link_i,
  output logic              ready_o,
  output logic              flit_acc,
  output logic              pkt_done,
  output node_t             pkt_src,
  output len_t              pkt_len,
  output stamp_t            pkt_lat
);

  localparam int CW = $clog2(DBG_DEPTH + 1);

  flit_t         flit;
  stamp_t        stamp;
  logic          crc_ok, dest_ok, len_ok;
  logic [31:0]   n_pkt, n_flit, n_crc, n_err;
  logic [63:0]   lat_sum;
  logic [31:0]   dbg_q;
  logic          dbg_empty, dbg_full;  // full only stops the capture
  logic [CW-1:0] dbg_cnt;

  noc_if_rx u_ni (
    .clk, .rst_n, .clr(bc.clr), .my_id(node_id), .accept, .link_i, .ready_o,
    .flit_acc, .flit, .pkt_done, .pkt_src, .pkt_len, .pkt_stamp(stamp),
    .pkt_crc_ok(crc_ok), .pkt_dest_ok(dest_ok), .pkt_len_ok(len_ok)
  );

  assign pkt_lat = now - stamp;

  sync_fifo #(.W(32), .DEPTH(DBG_DEPTH)) u_dbg (
    .clk, .rst_n, .clr(bc.clr),
    .push(dbg_en && flit_acc), .wdata(flit.data),
    .pop(rd && addr == 6'd6), .rdata(dbg_q),
    .empty(dbg_empty), .full(dbg_full), .count(dbg_cnt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_pkt <= '0; n_flit <= '0; n_crc <= '0; n_err <= '0; lat_sum <= '0;
    end else if (bc.clr) begin
      n_pkt <= '0; n_flit <= '0; n_crc <= '0; n_err <= '0; lat_sum <= '0;
    end else begin
      if (flit_acc) n_flit <= n_flit + 1'b1;
      if (pkt_done) begin
        n_pkt   <= n_pkt + 1'b1;
        lat_sum <= lat_sum + 64'(pkt_lat);
        if (!crc_ok)            n_crc <= n_crc + 1'b1;
        if (!dest_ok || !len_ok) n_err <= n_err + 1'b1;
      end
    end
  end

  always_comb begin
    unique case (addr)
      6'd1:    rdata = n_pkt;
      6'd2:    rdata = n_flit;
      6'd3:    rdata = n_crc;
      6'd4:    rdata = n_err;
      6'd5:    rdata = lat_sum[31:0];
      6'd11:   rdata = lat_sum[63:32];
      6'd6:    rdata = dbg_empty ? '0 : dbg_q;
      6'd7:    rdata = 32'(dbg_cnt);
      default: rdata = '0;
    endcase
  end

endmodule
