// OPB slave attachment of the emulation platform.
//
// Decodes OPB transfers addressed to [BASE_ADDR, BASE_ADDR + 2**ADDR_BITS)
// and turns each into one access strobe on the platform's local register
// bus. A transfer takes two cycles: in the first (select high, address
// hit) the strobe `acc` is issued with the local address, write flag and
// write data; in the second the slave raises xferAck and, for a read,
// drives the data returned by the local bus. Outside its acknowledge cycle
// the slave drives zeros, as the OR-combined OPB requires. Retry, errAck
// and toutSup are never used. Bits are numbered [31:0] with bit 0 the
// least significant; byte enables are ignored (32-bit accesses only).
// The document only names the OPB; this minimal attachment is this
// design's own.
module opb_slave #(
  parameter logic [31:0] BASE_ADDR = 32'h8000_0000,
  parameter int          ADDR_BITS = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [31:0]          opb_abus,
  input  logic [3:0]           opb_be,
  input  logic [31:0]          opb_dbus,
  input  logic                 opb_rnw,
  input  logic                 opb_select,
  input  logic                 opb_seqaddr,
  output logic [31:0]          sl_dbus,
  output logic                 sl_xferack,
  output logic                 sl_errack,
  output logic                 sl_retry,
  output logic                 sl_toutsup,
  // local register bus
  output logic                 acc,
  output logic                 we,
  output logic [ADDR_BITS-1:0] addr,
  output logic [31:0]          wdata,
  input  logic [31:0]          rdata
);

  logic hit, ack_q, rnw_q;

  assign hit   = opb_select &&
                 (opb_abus[31:ADDR_BITS] == BASE_ADDR[31:ADDR_BITS]);
  assign acc   = hit && !ack_q;
  assign we    = !opb_rnw;
  assign addr  = opb_abus[ADDR_BITS-1:0];
  assign wdata = opb_dbus;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q <= 1'b0;
      rnw_q <= 1'b0;
    end else begin
      ack_q <= acc;
      rnw_q <= opb_rnw;
    end
  end

  assign sl_xferack = ack_q;
  assign sl_dbus    = (ack_q && rnw_q) ? rdata : '0;
  assign sl_errack  = 1'b0;
  assign sl_retry   = 1'b0;
  assign sl_toutsup = 1'b0;

  // be and seqaddr are accepted but do not change the transfer
  logic unused;
  assign unused = ^{opb_be, opb_seqaddr};

  // a transfer is acknowledged exactly once
  ap_one_ack: assert property (@(posedge clk) disable iff (!rst_n)
                               sl_xferack |=> !sl_xferack);

endmodule
