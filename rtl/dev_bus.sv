// Device register bus: one independent strobe bus per traffic device.
//
// The local bus from the OPB slave carries a byte address; bits [18:8]
// select a device slot and bits [7:2] a 32-bit register in it. Each of the
// N_DEV devices is given its slot number by SLOTS and gets its own select
// strobe, so devices only see their own accesses. Read data of the devices
// (each registered one cycle after its strobe) is multiplexed back by the
// slot selected in the previous cycle. Slots not present read as zero.
// The slot plan (generator of node n at n, receptor at 512+n, control
// module k at 1024+k) gives room for 1024 generators/receptors as the
// document allows; the layout itself is this design's choice.
module dev_bus
  import noc_emu_pkg::*;
#(
  parameter int N_DEV = 10,
  parameter logic [N_DEV*11-1:0] SLOTS = '0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   acc,      // access strobe from the bridge
  input  logic                   we,
  input  logic [19:0]            addr,
  output logic [N_DEV-1:0]       dev_sel,
  output logic [REG_AW-1:0]      dev_addr,
  input  logic [N_DEV-1:0][31:0] dev_rdata,
  output logic [31:0]            rdata
);

  logic [10:0]      slot;
  logic [N_DEV-1:0] rd_q;

  assign slot     = addr[18:8];
  assign dev_addr = addr[7:2];

  always_comb begin
    for (int i = 0; i < N_DEV; i++)
      dev_sel[i] = acc && (slot == SLOTS[i*11 +: 11]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_q <= '0;
    else        rd_q <= we ? '0 : dev_sel;
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < N_DEV; i++)
      if (rd_q[i]) rdata |= dev_rdata[i];
  end

endmodule
