// Monitor: serial link between the processor and the host PC.
//
// An OPB slave with a transmit and a receive FIFO and an 8N1 UART. The
// processor writes characters of its statistics report to the transmit
// FIFO and the UART shifts them out on uart_tx, least significant bit first,
// CLKS_PER_BIT clock cycles per bit (434 = 50 MHz / 115200 baud). Received
// characters are sampled in the middle of each bit and queued for the
// processor. Registers at BASE_ADDR (byte offsets): 0 receive data (read
// removes it), 4 transmit data (write), 8 status {tx_full[3], tx_empty[2],
// rx_full[1], rx_valid[0]}, 12 control {clear rx[1], clear tx[0]}. A
// received character that finds the receive FIFO full is dropped.
// The document says only that the monitor connects to the host PC through
// the serial port; the register map and UART format are this design's.
module monitor_uart #(
  parameter logic [31:0] BASE_ADDR    = 32'h4060_0000,
  parameter int          CLKS_PER_BIT = 434,
  parameter int          FIFO_DEPTH   = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] opb_abus,
  input  logic [3:0]  opb_be,
  input  logic [31:0] opb_dbus,
  input  logic        opb_rnw,
  input  logic        opb_select,
  input  logic        opb_seqaddr,
  output logic [31:0] sl_dbus,
  output logic        sl_xferack,
  output logic        sl_errack,
  output logic        sl_retry,
  output logic        sl_toutsup,
  output logic        uart_tx,
  input  logic        uart_rx
);

  localparam int DW = $clog2(CLKS_PER_BIT + 1);
  localparam int CW = $clog2(FIFO_DEPTH + 1);

  logic        acc, we;
  logic [3:0]  addr;
  logic [31:0] wdata, rdata;

  opb_slave #(.BASE_ADDR(BASE_ADDR), .ADDR_BITS(4)) u_opb (
    .clk, .rst_n, .opb_abus, .opb_be, .opb_dbus, .opb_rnw, .opb_select,
    .opb_seqaddr, .sl_dbus, .sl_xferack, .sl_errack, .sl_retry, .sl_toutsup,
    .acc, .we, .addr, .wdata, .rdata
  );

  // ---------------- FIFOs
  logic [7:0]    tx_q, rx_q, rx_byte;
  logic          tx_empty, tx_full, rx_empty, rx_full, tx_pop, rx_push;
  logic          clr_tx, clr_rx;
  logic [CW-1:0] tx_cnt, rx_cnt;

  assign clr_tx = acc && we && addr[3:2] == 2'd3 && wdata[0];
  assign clr_rx = acc && we && addr[3:2] == 2'd3 && wdata[1];

  sync_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst_n, .clr(clr_tx), .push(acc && we && addr[3:2] == 2'd1),
    .wdata(wdata[7:0]), .pop(tx_pop), .rdata(tx_q), .empty(tx_empty),
    .full(tx_full), .count(tx_cnt)
  );
  sync_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst_n, .clr(clr_rx), .push(rx_push), .wdata(rx_byte),
    .pop(acc && !we && addr[3:2] == 2'd0), .rdata(rx_q), .empty(rx_empty),
    .full(rx_full), .count(rx_cnt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= '0;
    else if (acc && !we) begin
      unique case (addr[3:2])
        2'd0:    rdata <= rx_empty ? '0 : 32'(rx_q);
        2'd2:    rdata <= {28'b0, tx_full, tx_empty, rx_full, !rx_empty};
        default: rdata <= '0;
      endcase
    end
  end

  // ---------------- transmitter
  logic [9:0]    tx_sh;
  logic [3:0]    tx_bits;
  logic [DW-1:0] tx_div;

  assign tx_pop  = (tx_bits == 0) && !tx_empty;
  assign uart_tx = (tx_bits == 0) ? 1'b1 : tx_sh[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh <= '1; tx_bits <= '0; tx_div <= '0;
    end else if (tx_pop) begin
      tx_sh   <= {1'b1, tx_q, 1'b0};
      tx_bits <= 4'd10;
      tx_div  <= DW'(CLKS_PER_BIT - 1);
    end else if (tx_bits != 0) begin
      if (tx_div == 0) begin
        tx_sh   <= {1'b1, tx_sh[9:1]};
        tx_bits <= tx_bits - 1'b1;
        tx_div  <= DW'(CLKS_PER_BIT - 1);
      end else begin
        tx_div <= tx_div - 1'b1;
      end
    end
  end

  // ---------------- receiver
  logic [1:0]    rx_sync;
  logic          rx_busy;
  logic [3:0]    rx_bits;
  logic [DW-1:0] rx_div;
  logic [8:0]    rx_sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync <= 2'b11; rx_busy <= 1'b0; rx_bits <= '0; rx_div <= '0;
      rx_sh <= '0; rx_push <= 1'b0; rx_byte <= '0;
    end else begin
      rx_sync <= {rx_sync[0], uart_rx};
      rx_push <= 1'b0;
      if (!rx_busy) begin
        if (!rx_sync[1]) begin                 // start bit seen
          rx_busy <= 1'b1;
          rx_bits <= 4'd0;
          rx_div  <= DW'(CLKS_PER_BIT / 2);
        end
      end else if (rx_div == 0) begin
        rx_div <= DW'(CLKS_PER_BIT - 1);
        if (rx_bits == 0 && rx_sync[1]) begin
          rx_busy <= 1'b0;                     // false start
        end else if (rx_bits == 4'd9) begin
          rx_busy <= 1'b0;
          if (rx_sync[1] && !rx_full) begin    // valid stop bit
            rx_byte <= rx_sh[8:1];
            rx_push <= 1'b1;
          end
        end else begin
          rx_sh   <= {rx_sync[1], rx_sh[8:1]};
          rx_bits <= rx_bits + 1'b1;
        end
      end else begin
        rx_div <= rx_div - 1'b1;
      end
    end
  end

  logic unused;
  assign unused = ^{tx_cnt, rx_cnt};

endmodule
