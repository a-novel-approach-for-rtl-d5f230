// Control module: synchronises a group of traffic generators and receptors.
//
// The processor writes the command register (word 0): bit 0 starts the
// emulation, bit 1 stops it, bit 2 resets the group. Start raises the
// broadcast `run` for every device of the group in the same cycle, so all
// start together; stop drops it; reset sends a one-cycle `clr` that clears
// state and statistics of all devices and of this module, and stops it.
// While running, an emulation-time counter advances once per cycle and is
// broadcast with run and clr (receptors use it for their histograms).
//
// The time counter is 64 bits wide, so that runs of 10^10 cycles and more
// (10^9 packets of 10 cycles) are timed; devices receive its low 32 bits,
// held at all ones once the count no longer fits.
//
// Registers (read): 0 status {done_all, running}; 1 emulation time, low
// word; 3 emulation time, high word; 2 done mask of the devices. done_all is high when every device of the
// group reports done. Reads return one cycle after the strobe.
// The document gives the function (synchronised start, stop, reset of the
// whole platform); the register layout and time counter are this design's.
module emu_control
  import noc_emu_pkg::*;
#(
  parameter int N_DEV = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,
  input  logic              we,
  input  logic [REG_AW-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  input  logic [N_DEV-1:0]  dev_done,
  output bcast_t            bc
);

  logic        running, clr_q;
  logic [63:0] etime;

  assign bc.run   = running;
  assign bc.clr   = clr_q;
  assign bc.etime = (etime[63:32] != 0) ? '1 : etime[31:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      clr_q   <= 1'b0;
      etime   <= '0;
      rdata   <= '0;
    end else begin
      clr_q <= 1'b0;
      if (running) etime <= etime + 1'b1;
      if (sel && we && addr == 0) begin
        if (wdata[2]) begin
          clr_q   <= 1'b1;
          running <= 1'b0;
          etime   <= '0;
        end else if (wdata[1]) begin
          running <= 1'b0;
        end else if (wdata[0]) begin
          running <= 1'b1;
        end
      end
      if (sel && !we) begin
        unique case (addr)
          6'd0:    rdata <= {30'b0, &dev_done, running};
          6'd1:    rdata <= etime[31:0];
          6'd3:    rdata <= etime[63:32];
          6'd2:    rdata <= 32'(dev_done);
          default: rdata <= '0;
        endcase
      end
    end
  end

endmodule
