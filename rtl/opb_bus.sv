// On-chip Peripheral Bus return path for a single master.
//
// The OPB is an AND-OR bus: every slave drives zeros except while it
// acknowledges, and the master sees the OR of all slaves. This module
// combines N_SLV slave returns (data, xferAck, errAck, retry, toutSup)
// into the master's inputs, and checks that no two slaves acknowledge in
// the same cycle. With one master (the processor) no arbiter is needed;
// the master's request signals go to all slaves unchanged.
module opb_bus #(
  parameter int N_SLV = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_SLV-1:0][31:0] sl_dbus,
  input  logic [N_SLV-1:0]       sl_xferack,
  input  logic [N_SLV-1:0]       sl_errack,
  input  logic [N_SLV-1:0]       sl_retry,
  input  logic [N_SLV-1:0]       sl_toutsup,
  output logic [31:0]            m_dbus,
  output logic                   m_xferack,
  output logic                   m_errack,
  output logic                   m_retry,
  output logic                   m_toutsup
);

  always_comb begin
    m_dbus = '0;
    for (int i = 0; i < N_SLV; i++) m_dbus |= sl_dbus[i];
  end
  assign m_xferack = |sl_xferack;
  assign m_errack  = |sl_errack;
  assign m_retry   = |sl_retry;
  assign m_toutsup = |sl_toutsup;

  ap_single_ack: assert property (@(posedge clk) disable iff (!rst_n)
                                  $onehot0(sl_xferack));

endmodule
