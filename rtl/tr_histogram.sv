// Histogram traffic receptor (the receptor type for stochastic traffic).
//
// Acknowledges every flit it is offered and keeps the statistics of
// tr_common plus a histogram of acknowledged flits over emulation time:
// a flit taken at emulation time t (the group's bc.etime) is counted in bin
// min(t >> GRAN, N_BINS-1). GRAN, the bin width as a power of two, is set
// by the processor, giving the user-defined granularity.
//
// Registers (word address): 0 CTRL {gran[12:8], dbg_en[1]}; 1..7 as in
// tr_common; 32..32+N_BINS-1 histogram bins. Reads answer one cycle after
// the strobe. bc.clr clears the statistics and bins, rst_n also the CTRL
// register.
// Histogram over time with programmable granularity follows the document;
// the bin rule and registers are this design's.
module tr_histogram
  import noc_emu_pkg::*;
#(
  parameter int N_BINS = 16
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

  localparam int BW = $clog2(N_BINS);

  logic [4:0]  gran;
  logic        dbg_en, flit_acc, pkt_done;
  logic [31:0] c_rdata;
  node_t       pkt_src;
  len_t        pkt_len;
  stamp_t      pkt_lat, tbin;
  logic [BW-1:0] bin;
  logic [31:0] hist [N_BINS];

  tr_common u_core (
    .clk, .rst_n, .node_id, .bc, .now, .accept(1'b1), .dbg_en,
    .rd(sel && !we), .addr, .rdata(c_rdata), .link_i, .ready_o,
    .flit_acc, .pkt_done, .pkt_src, .pkt_len, .pkt_lat
  );

  // a receptor is done whenever no packet is half received
  logic in_pkt;
  assign done = !in_pkt;

  always_comb begin
    tbin = bc.etime >> gran;
    bin  = (tbin > stamp_t'(N_BINS-1)) ? BW'(N_BINS-1) : tbin[BW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gran <= '0; dbg_en <= 1'b0; rdata <= '0; in_pkt <= 1'b0;
      for (int i = 0; i < N_BINS; i++) hist[i] <= '0;
    end else begin
      if (sel && we && addr == 6'd0) {gran, dbg_en} <= {wdata[12:8], wdata[1]};
      if (bc.clr) begin
        in_pkt <= 1'b0;
        for (int i = 0; i < N_BINS; i++) hist[i] <= '0;
      end else if (flit_acc) begin
        hist[bin] <= hist[bin] + 1'b1;
        in_pkt    <= !link_i.flit.tail;
      end
      if (sel && !we) begin
        if (addr == 6'd0)       rdata <= {19'b0, gran, 6'b0, dbg_en, 1'b0};
        else if (addr >= 6'd32) rdata <= (addr - 6'd32 < 6'(N_BINS)) ? hist[BW'(addr - 6'd32)] : '0;
        else                    rdata <= c_rdata;
      end
    end
  end

  logic unused;
  assign unused = ^{pkt_done, pkt_src, pkt_len, pkt_lat};

endmodule
