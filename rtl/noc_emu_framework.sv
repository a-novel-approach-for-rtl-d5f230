// NoC emulation framework: the emulation platform and the monitor on the
// processor's On-chip Peripheral Bus.
//
// The hard-core processor (outside this module) is the only OPB master: it
// programs the traffic generators, starts the emulation through the control
// modules, collects statistics from the receptors and prints its report
// through the monitor UART to the host PC. The network of switches under
// test is also outside: it takes the generators' flits from tg_link_o and
// delivers them to the receptors on tr_link_i, with valid/ready flow
// control on each link (a flit moves when both are high).
//
// OPB map: emulation platform at PLATFORM_BASE (1 MiB window, see
// emu_platform), monitor UART at MONITOR_BASE (16 bytes, see monitor_uart).
// A transfer is acknowledged (opb_xferack) in the cycle after it is
// presented; read data is valid with the acknowledge.
// Structure follows the document's framework and platform figures; the
// numbers of devices are parameters defaulting to 4 generators and 4
// receptors, 2 of each type.
module noc_emu_framework
  import noc_emu_pkg::*;
#(
  parameter logic [31:0] PLATFORM_BASE = 32'h8000_0000,
  parameter logic [31:0] MONITOR_BASE  = 32'h4060_0000,
  parameter int          CLKS_PER_BIT  = 434,
  parameter int          N_STG = 2,
  parameter int          N_TTG = 2,
  parameter int          N_HTR = 2,
  parameter int          N_TTR = 2,
  localparam int         NTG = N_STG + N_TTG,
  localparam int         NTR = N_HTR + N_TTR
) (
  input  logic            clk,
  input  logic            rst_n,
  // OPB, master side (processor)
  input  logic [31:0]     opb_abus,
  input  logic [3:0]      opb_be,
  input  logic [31:0]     opb_wdbus,
  input  logic            opb_rnw,
  input  logic            opb_select,
  input  logic            opb_seqaddr,
  output logic [31:0]     opb_rdbus,
  output logic            opb_xferack,
  output logic            opb_errack,
  output logic            opb_retry,
  output logic            opb_toutsup,
  // serial line to the host PC
  output logic            uart_tx,
  input  logic            uart_rx,
  // links to and from the network of switches under test
  output link_t [NTG-1:0] tg_link_o,
  input  logic  [NTG-1:0] tg_ready_i,
  input  link_t [NTR-1:0] tr_link_i,
  output logic  [NTR-1:0] tr_ready_o
);

  logic [1:0][31:0] s_dbus;
  logic [1:0]       s_ack, s_err, s_retry, s_tout;

  emu_platform #(
    .BASE_ADDR(PLATFORM_BASE), .N_STG(N_STG), .N_TTG(N_TTG),
    .N_HTR(N_HTR), .N_TTR(N_TTR)
  ) u_platform (
    .clk, .rst_n, .opb_abus, .opb_be, .opb_dbus(opb_wdbus), .opb_rnw,
    .opb_select, .opb_seqaddr,
    .sl_dbus(s_dbus[0]), .sl_xferack(s_ack[0]), .sl_errack(s_err[0]),
    .sl_retry(s_retry[0]), .sl_toutsup(s_tout[0]),
    .tg_link_o, .tg_ready_i, .tr_link_i, .tr_ready_o
  );

  monitor_uart #(.BASE_ADDR(MONITOR_BASE), .CLKS_PER_BIT(CLKS_PER_BIT)) u_monitor (
    .clk, .rst_n, .opb_abus, .opb_be, .opb_dbus(opb_wdbus), .opb_rnw,
    .opb_select, .opb_seqaddr,
    .sl_dbus(s_dbus[1]), .sl_xferack(s_ack[1]), .sl_errack(s_err[1]),
    .sl_retry(s_retry[1]), .sl_toutsup(s_tout[1]),
    .uart_tx, .uart_rx
  );

  opb_bus #(.N_SLV(2)) u_opb (
    .clk, .rst_n, .sl_dbus(s_dbus), .sl_xferack(s_ack), .sl_errack(s_err),
    .sl_retry(s_retry), .sl_toutsup(s_tout),
    .m_dbus(opb_rdbus), .m_xferack(opb_xferack), .m_errack(opb_errack),
    .m_retry(opb_retry), .m_toutsup(opb_toutsup)
  );

endmodule
