// Trace traffic receptor: writes a report record for every packet.
//
// For each received packet it pushes into a REPORT_DEPTH-entry FIFO a
// descriptor in the generators' trace format {length[31:26],
// source[25:16], time since the previous arrival[15:0] (saturated)} and a
// second word with the packet latency (see tr_common), from which the
// processor reconstructs arrival times and latencies packet by packet.
// While the report FIFO is full the receptor stops acknowledging flits, so
// no record is lost; the network sees back-pressure instead.
//
// Registers (word address): 0 CTRL {dbg_en[1]}; 1..7 as in tr_common;
// 8 report descriptor at the FIFO head; 9 its latency (reading 9 removes
// the record); 10 records in the FIFO. Reads answer one cycle after the
// strobe; an empty FIFO reads as zero.
// Report per packet in the generators' format and latency extraction follow
// the document; record layout and flow control are this design's.
module tr_trace
  import noc_emu_pkg::*;
#(
  parameter int REPORT_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  node_t             node_id,
  input  bcast_t            bc,
  input  stamp_t            now,
  input  logic              sel,
  input  logic              we,
  input  logic [REG_AW-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  output logic              done,
  input  link_t             link_i,
  output logic              ready_o
);

  localparam int CW = $clog2(REPORT_DEPTH + 1);

  logic        dbg_en, flit_acc, pkt_done, in_pkt;
  logic [31:0] c_rdata;
  node_t       pkt_src;
  len_t        pkt_len;
  stamp_t      pkt_lat, last_arr, gap;
  desc_t       rec_desc;
  logic [63:0] rec_q;
  logic        r_empty, r_full;
  logic [CW-1:0] r_cnt;

  tr_common u_core (
    .clk, .rst_n, .node_id, .bc, .now, .accept(!r_full), .dbg_en,
    .rd(sel && !we), .addr, .rdata(c_rdata), .link_i, .ready_o,
    .flit_acc, .pkt_done, .pkt_src, .pkt_len, .pkt_lat
  );

  assign gap      = now - last_arr;
  assign rec_desc = '{len: pkt_len, node: pkt_src,
                      dt: (gap > stamp_t'(16'hFFFF)) ? 16'hFFFF : gap[15:0]};
  assign done     = !in_pkt;

  sync_fifo #(.W(64), .DEPTH(REPORT_DEPTH)) u_rep (
    .clk, .rst_n, .clr(bc.clr),
    .push(pkt_done), .wdata({rec_desc, pkt_lat}),
    .pop(sel && !we && addr == 6'd9), .rdata(rec_q),
    .empty(r_empty), .full(r_full), .count(r_cnt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dbg_en <= 1'b0; rdata <= '0; last_arr <= '0; in_pkt <= 1'b0;
    end else begin
      if (sel && we && addr == 6'd0) dbg_en <= wdata[1];
      if (bc.clr) begin
        last_arr <= now;
        in_pkt   <= 1'b0;
      end else begin
        if (pkt_done) last_arr <= now;
        if (flit_acc) in_pkt <= !link_i.flit.tail;
      end
      if (sel && !we) begin
        unique case (addr)
          6'd0:    rdata <= {30'b0, dbg_en, 1'b0};
          6'd8:    rdata <= r_empty ? '0 : rec_q[63:32];
          6'd9:    rdata <= r_empty ? '0 : rec_q[31:0];
          6'd10:   rdata <= 32'(r_cnt);
          default: rdata <= c_rdata;
        endcase
      end
    end
  end

  // the report FIFO is never pushed while full: flits stop first
  ap_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   pkt_done |-> !r_full);

endmodule
