// NoC interface, generator side: turns a packet request into flits.
//
// A generator hands over (destination, length); the interface emits the
// header flit, a flit holding the injection time stamp, len-3 payload flits
// from a 32-bit LFSR and a tail flit carrying the CRC-32 of all earlier
// flits, so that a receptor can check that what arrives is what was sent.
// The injection time stamp is the value of `now` when the request is taken.
//
// Interface: req_valid/req_ready handshake for requests (ready only while
// idle, so consecutive packets are separated by one idle cycle); link_o /
// ready_i towards the network, a flit moves in a cycle with valid and ready.
// flit_sent pulses once per accepted flit, pkt_sent once per tail flit.
// Lengths below 3 are raised to 3. clr returns to idle and reseeds the LFSR.
// The document only names this interface; the packet format, the CRC and
// the valid/ready handshake are this design's own.
module noc_if_tx
  import noc_emu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr,
  input  node_t  src_id,
  input  stamp_t now,
  input  logic   req_valid,
  input  node_t  req_dest,
  input  len_t   req_len,
  output logic   req_ready,
  output link_t  link_o,
  input  logic   ready_i,
  output logic   flit_sent,
  output logic   pkt_sent
);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_STAMP, S_PAY, S_CRC} state_t;
  state_t      state;
  node_t       dest;
  len_t        len;
  len_t        left;      // payload flits still to send
  stamp_t      stamp;
  logic [31:0] crc, lfsr;
  logic        xfer;

  assign req_ready = (state == S_IDLE);
  assign xfer      = link_o.valid && ready_i;
  assign flit_sent = xfer;
  assign pkt_sent  = xfer && (state == S_CRC);

  always_comb begin
    link_o.valid     = (state != S_IDLE);
    link_o.flit.head = (state == S_HDR);
    link_o.flit.tail = (state == S_CRC);
    unique case (state)
      S_HDR:   link_o.flit.data = make_header(dest, src_id, len);
      S_STAMP: link_o.flit.data = stamp;
      S_PAY:   link_o.flit.data = lfsr;
      S_CRC:   link_o.flit.data = crc;
      default: link_o.flit.data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      dest  <= '0;
      len   <= '0;
      left  <= '0;
      stamp <= '0;
      crc   <= CRC_INIT;
      lfsr  <= 32'h1;
    end else if (clr) begin
      state <= S_IDLE;
      crc   <= CRC_INIT;
      lfsr  <= {12'hACE, src_id, 10'h001};
    end else begin
      if (state == S_IDLE && req_valid) begin
        dest  <= req_dest;
        len   <= (req_len < len_t'(MIN_LEN)) ? len_t'(MIN_LEN) : req_len;
        left  <= (req_len < len_t'(MIN_LEN)) ? '0 : req_len - len_t'(MIN_LEN);
        stamp <= now;
        crc   <= CRC_INIT;
        state <= S_HDR;
      end
      if (xfer) begin
        if (state != S_CRC) crc <= crc32_word(crc, link_o.flit.data);
        unique case (state)
          S_HDR:   state <= S_STAMP;
          S_STAMP: state <= (left == 0) ? S_CRC : S_PAY;
          S_PAY: begin
            lfsr <= lfsr32(lfsr);
            left <= left - 1'b1;
            if (left == 1) state <= S_CRC;
          end
          S_CRC:   state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
