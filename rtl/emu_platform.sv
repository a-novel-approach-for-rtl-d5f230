// NoC emulation platform: traffic generators, traffic receptors and their
// control modules, made addressable by the processor over the OPB.
//
// Node n of the network under test has a generator (TG n) that injects on
// tg_link_o[n] and a receptor (TR n) that takes packets from tr_link_i[n];
// the network of switches between them is outside this module. Nodes
// 0..N_STG-1 have stochastic generators, the next N_TTG trace-driven ones;
// receptors 0..N_HTR-1 are histogram receptors, the next N_TTR trace
// receptors. There is one control module per device kind: control 0 starts,
// stops and clears the stochastic generators and histogram receptors,
// control 1 the trace-driven generators and trace receptors, so both kinds
// can be mixed in one emulation. A free-running cycle counter gives all
// generators and receptors one time base for injection stamps and latency.
//
// Address map inside BASE_ADDR (byte address bits [18:8] = device slot,
// [7:2] = register): TG n at slot n, TR n at slot 512+n, control k at slot
// 1024+k. Each device has its own select strobe (dev_bus).
// One specific control module per kind and independent device busses
// follow the document; the numbers of each kind are parameters (defaults:
// the four generators and four receptors of the document's experiment).
module emu_platform
  import noc_emu_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = 32'h8000_0000,
  parameter int N_STG = 2,
  parameter int N_TTG = 2,
  parameter int N_HTR = 2,
  parameter int N_TTR = 2,
  localparam int NTG  = N_STG + N_TTG,
  localparam int NTR  = N_HTR + N_TTR
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       opb_abus,
  input  logic [3:0]        opb_be,
  input  logic [31:0]       opb_dbus,
  input  logic              opb_rnw,
  input  logic              opb_select,
  input  logic              opb_seqaddr,
  output logic [31:0]       sl_dbus,
  output logic              sl_xferack,
  output logic              sl_errack,
  output logic              sl_retry,
  output logic              sl_toutsup,
  output link_t [NTG-1:0]   tg_link_o,
  input  logic  [NTG-1:0]   tg_ready_i,
  input  link_t [NTR-1:0]   tr_link_i,
  output logic  [NTR-1:0]   tr_ready_o
);

  localparam int NDEV = NTG + NTR + 2;

  function automatic logic [NDEV*11-1:0] slot_map();
    logic [NDEV*11-1:0] m;
    m = '0;
    for (int i = 0; i < NTG; i++) m[i*11 +: 11]         = 11'(i);
    for (int j = 0; j < NTR; j++) m[(NTG+j)*11 +: 11]   = 11'(512 + j);
    for (int k = 0; k < 2; k++)   m[(NTG+NTR+k)*11 +: 11] = 11'(1024 + k);
    return m;
  endfunction

  logic                  acc, we;
  logic [19:0]           addr;
  logic [31:0]           wdata, rdata;
  logic [NDEV-1:0]       sel;
  logic [REG_AW-1:0]     raddr;
  logic [NDEV-1:0][31:0] drd;
  logic [NTG-1:0]        tg_done;
  logic [NTR-1:0]        tr_done;
  bcast_t                bc [2];
  stamp_t                now;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;

  opb_slave #(.BASE_ADDR(BASE_ADDR), .ADDR_BITS(20)) u_opb (
    .clk, .rst_n, .opb_abus, .opb_be, .opb_dbus, .opb_rnw, .opb_select,
    .opb_seqaddr, .sl_dbus, .sl_xferack, .sl_errack, .sl_retry, .sl_toutsup,
    .acc, .we, .addr, .wdata, .rdata
  );

  dev_bus #(.N_DEV(NDEV), .SLOTS(slot_map())) u_bus (
    .clk, .rst_n, .acc, .we, .addr, .dev_sel(sel), .dev_addr(raddr),
    .dev_rdata(drd), .rdata
  );

  // control modules: 0 = stochastic kind, 1 = trace kind
  emu_control #(.N_DEV(N_STG + N_HTR)) u_ctrl_stoch (
    .clk, .rst_n, .sel(sel[NTG+NTR]), .we, .addr(raddr), .wdata,
    .rdata(drd[NTG+NTR]), .dev_done({tr_done[N_HTR-1:0], tg_done[N_STG-1:0]}),
    .bc(bc[0])
  );
  emu_control #(.N_DEV(N_TTG + N_TTR)) u_ctrl_trace (
    .clk, .rst_n, .sel(sel[NTG+NTR+1]), .we, .addr(raddr), .wdata,
    .rdata(drd[NTG+NTR+1]), .dev_done({tr_done[NTR-1:N_HTR], tg_done[NTG-1:N_STG]}),
    .bc(bc[1])
  );

  for (genvar i = 0; i < NTG; i++) begin : g_tg
    if (i < N_STG) begin : g_stoch
      tg_stochastic u_tg (
        .clk, .rst_n, .node_id(node_t'(i)), .bc(bc[0]), .now,
        .sel(sel[i]), .we, .addr(raddr), .wdata, .rdata(drd[i]),
        .done(tg_done[i]), .link_o(tg_link_o[i]), .ready_i(tg_ready_i[i])
      );
    end else begin : g_trace
      tg_trace u_tg (
        .clk, .rst_n, .node_id(node_t'(i)), .bc(bc[1]), .now,
        .sel(sel[i]), .we, .addr(raddr), .wdata, .rdata(drd[i]),
        .done(tg_done[i]), .link_o(tg_link_o[i]), .ready_i(tg_ready_i[i])
      );
    end
  end

  for (genvar j = 0; j < NTR; j++) begin : g_tr
    if (j < N_HTR) begin : g_hist
      tr_histogram u_tr (
        .clk, .rst_n, .node_id(node_t'(j)), .bc(bc[0]), .now,
        .sel(sel[NTG+j]), .we, .addr(raddr), .wdata, .rdata(drd[NTG+j]),
        .done(tr_done[j]), .link_i(tr_link_i[j]), .ready_o(tr_ready_o[j])
      );
    end else begin : g_trace
      tr_trace u_tr (
        .clk, .rst_n, .node_id(node_t'(j)), .bc(bc[1]), .now,
        .sel(sel[NTG+j]), .we, .addr(raddr), .wdata, .rdata(drd[NTG+j]),
        .done(tr_done[j]), .link_i(tr_link_i[j]), .ready_o(tr_ready_o[j])
      );
    end
  end

endmodule
