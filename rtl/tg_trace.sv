// Trace-driven traffic generator with its NoC interface.
//
// The processor streams 32-bit packet descriptors {length[31:26],
// destination[25:16], relative time[15:0]} into a FIFO by writing register
// 1. While the group's `run` is high and the generator is enabled, the
// descriptor at the head of the FIFO is turned into a packet request when
// (relative time << SHIFT) run cycles have passed since the previous
// request (for the first one, since the start). SHIFT, set by software,
// stretches the trace to lower the injection rate without touching it.
// A request is only made while the interface is idle, so a packet whose
// time comes while the previous one is still being sent (or held back by
// the network), or while the FIFO is empty, goes out as soon as possible
// and is counted as late. Without stalls the head flits of consecutive
// packets are max(dt << SHIFT, previous length + 2) cycles apart.
//
// Registers (word address): 0 CTRL {shift[7:4], enable[0]}; 1 write:
// push descriptor, read: free FIFO entries; 2 packets sent; 3 flits sent;
// 4 STATUS {busy, done}; 5 late requests. Reads answer one cycle after the
// strobe. done is high when enabled, the FIFO is empty and the interface
// idle. A push to a full FIFO is dropped.
// The descriptor's three fields and its 32-bit size follow the document;
// the field widths, timing rule and registers are this design's choice.
module tg_trace
  import noc_emu_pkg::*;
#(
  parameter int FIFO_DEPTH = 16
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
  output link_t             link_o,
  input  logic              ready_i
);

  localparam int CW = $clog2(FIFO_DEPTH + 1);

  logic        enable;
  logic [3:0]  shift;
  logic [31:0] pkt_sent, flit_sent, late, timer;
  logic        req_valid, req_ready, f_sent, p_sent;
  node_t       req_dest;
  len_t        req_len;
  desc_t       head;
  logic        f_empty, f_full, fire;
  logic [CW-1:0] f_count;
  logic [31:0] due;

  sync_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr(bc.clr),
    .push(sel && we && addr == 6'd1), .wdata,
    .pop(fire), .rdata(head), .empty(f_empty), .full(f_full), .count(f_count)
  );

  assign due  = 32'(head.dt) << shift;
  assign fire = bc.run && enable && !f_empty && !req_valid && req_ready && (timer >= due);
  assign done = enable && f_empty && !req_valid && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable <= 1'b0; shift <= '0; rdata <= '0;
    end else begin
      if (sel && we && addr == 6'd0) {shift, enable} <= {wdata[7:4], wdata[0]};
      if (sel && !we) begin
        unique case (addr)
          6'd0: rdata <= {24'b0, shift, 3'b0, enable};
          6'd1: rdata <= 32'(FIFO_DEPTH) - 32'(f_count);
          6'd2: rdata <= pkt_sent;
          6'd3: rdata <= flit_sent;
          6'd4: rdata <= {30'b0, !req_ready || req_valid, done};
          6'd5: rdata <= late;
          default: rdata <= '0;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= '0; late <= '0; pkt_sent <= '0; flit_sent <= '0;
      req_valid <= 1'b0; req_dest <= '0; req_len <= '0;
    end else if (bc.clr) begin
      timer <= '0; late <= '0; pkt_sent <= '0; flit_sent <= '0;
      req_valid <= 1'b0;
    end else begin
      if (f_sent) flit_sent <= flit_sent + 1'b1;
      if (p_sent) pkt_sent  <= pkt_sent + 1'b1;
      if (req_valid && req_ready) req_valid <= 1'b0;
      if (bc.run && enable && timer != '1) timer <= timer + 1'b1;
      if (fire) begin
        req_valid <= 1'b1;
        req_dest  <= head.node;
        req_len   <= head.len;
        timer     <= 32'd1;
        if (timer > due) late <= late + 1'b1;
      end
    end
  end

  noc_if_tx u_ni (
    .clk, .rst_n, .clr(bc.clr), .src_id(node_id), .now,
    .req_valid, .req_dest, .req_len, .req_ready,
    .link_o, .ready_i, .flit_sent(f_sent), .pkt_sent(p_sent)
  );

endmodule
