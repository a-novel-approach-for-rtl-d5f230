// Stochastic traffic generator with its NoC interface.
//
// The traffic is a function of registers written by the processor, so one
// generator serves many experiments without resynthesis. While the group's
// `run` is high and the generator is enabled it issues packet requests to
// its noc_if_tx according to the selected model:
//   mode 0  uniform: in each free cycle a packet starts with probability
//           RATE/65536 (16 LFSR bits compared with RATE);
//   mode 1  bursts: BURST_LEN packets back to back, then GAP idle cycles;
//   mode 2  normal: the gap after each packet is BASE + (S << SCALE), S the
//           sum of four uniform 4-bit values (mean 30, close to a normal
//           distribution).
// Packet length is drawn uniformly in [LEN_MIN, LEN_MAX], destination is
// fixed or DEST_BASE + (random & DEST_MASK). After NPKT packets (0 means no
// limit) the generator stops and reports done.
//
// Registers (word address): 0 CTRL {rand_dest[3], mode[2:1], enable[0]};
// 1 RATE[15:0]; 2 LEN {max[13:8], min[5:0]}; 3 DEST {mask[25:16],
// base[9:0]}; 4 NPKT; 5 BURST {gap[31:16], burst_len[15:0]} in mode 1 or
// {scale[19:16], base[15:0]} in mode 2; 6 packets sent; 7 flits sent;
// 8 STATUS {busy, done}; in mode 1 also 9 delivery time of the last burst,
// 10 sum of burst delivery times, 11 bursts delivered. A burst's delivery
// time runs from the cycle its first packet is requested to the cycle
// after the network takes the tail flit of its last packet (with a network
// that never stalls: BURST_LEN * (len + 1) + 1 cycles).
// Reads answer one cycle after the strobe. Config
// registers are cleared only by rst_n; the group clear (bc.clr) resets
// counters and generation state.
// The document names uniform, burst and normal models and a programmable
// rate and packet characteristics; the exact models and register layout
// are this design's.
module tg_stochastic
  import noc_emu_pkg::*;
(
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

  typedef enum logic [1:0] {M_UNIFORM, M_BURST, M_NORMAL, M_RSVD} mode_t;

  // configuration
  logic        enable, rand_dest;
  mode_t       mode;
  logic [15:0] rate;
  len_t        len_min, len_max;
  node_t       dest_base, dest_mask;
  logic [31:0] npkt, burst_cfg;
  // statistics and state
  logic [31:0] pkt_sent, flit_sent, issued;
  logic [31:0] lfsr;
  logic [19:0] wait_cnt;
  logic [15:0] burst_cnt;
  logic        req_valid, req_ready;
  node_t       req_dest;
  len_t        req_len;
  logic        f_sent, p_sent;
  // burst delivery statistics
  logic        b_active;
  logic [15:0] b_left;
  stamp_t      b_start;
  logic [31:0] b_last, b_sum, b_count;

  // random packet characteristics
  len_t  span, smask, r;
  node_t rdest;
  logic  fire;
  logic [5:0] nsum;

  always_comb begin
    span  = len_max - len_min;
    smask = span | (span >> 1) | (span >> 2) | (span >> 3) | (span >> 4) | (span >> 5);
    r     = lfsr[21:16] & smask;
    if (r > span) r = r - (span + 1'b1);
    rdest = dest_base + (lfsr[31:22] & dest_mask);
    nsum  = 6'(lfsr[3:0]) + 6'(lfsr[7:4]) + 6'(lfsr[11:8]) + 6'(lfsr[15:12]);
  end

  assign done = enable && (npkt != 0) && (issued == npkt) && !req_valid && req_ready;

  always_comb begin
    fire = 1'b0;
    if (bc.run && enable && !req_valid && !(npkt != 0 && issued == npkt)) begin
      unique case (mode)
        M_UNIFORM: fire = (lfsr[15:0] < rate);
        M_BURST, M_NORMAL: fire = (wait_cnt == 0);
        default:   fire = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable <= 1'b0; rand_dest <= 1'b0; mode <= M_UNIFORM; rate <= '0;
      len_min <= len_t'(MIN_LEN); len_max <= len_t'(MIN_LEN);
      dest_base <= '0; dest_mask <= '0; npkt <= '0; burst_cfg <= '0;
      rdata <= '0;
    end else begin
      if (sel && we) begin
        unique case (addr)
          6'd0: {rand_dest, mode, enable} <= {wdata[3], mode_t'(wdata[2:1]), wdata[0]};
          6'd1: rate <= wdata[15:0];
          6'd2: {len_max, len_min} <= {wdata[13:8], wdata[5:0]};
          6'd3: {dest_mask, dest_base} <= {wdata[25:16], wdata[9:0]};
          6'd4: npkt <= wdata;
          6'd5: burst_cfg <= wdata;
          default: ;
        endcase
      end
      if (sel && !we) begin
        unique case (addr)
          6'd0: rdata <= {28'b0, rand_dest, mode, enable};
          6'd1: rdata <= {16'b0, rate};
          6'd2: rdata <= {18'b0, len_max, 2'b0, len_min};
          6'd3: rdata <= {6'b0, dest_mask, 6'b0, dest_base};
          6'd4: rdata <= npkt;
          6'd5: rdata <= burst_cfg;
          6'd6: rdata <= pkt_sent;
          6'd7: rdata <= flit_sent;
          6'd8: rdata <= {30'b0, !req_ready || req_valid, done};
          6'd9: rdata <= b_last;
          6'd10: rdata <= b_sum;
          6'd11: rdata <= b_count;
          default: rdata <= '0;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= 32'h1; wait_cnt <= '0; burst_cnt <= '0; issued <= '0;
      req_valid <= 1'b0; req_dest <= '0; req_len <= '0;
      pkt_sent <= '0; flit_sent <= '0;
    end else if (bc.clr) begin
      lfsr <= {node_id, 22'h2A_5A5B}; wait_cnt <= '0; burst_cnt <= '0; issued <= '0;
      req_valid <= 1'b0; pkt_sent <= '0; flit_sent <= '0;
    end else begin
      lfsr <= lfsr32(lfsr);
      if (f_sent) flit_sent <= flit_sent + 1'b1;
      if (p_sent) pkt_sent  <= pkt_sent + 1'b1;
      if (req_valid && req_ready) req_valid <= 1'b0;
      if (bc.run && enable && (mode == M_BURST || mode == M_NORMAL) &&
          !req_valid && wait_cnt != 0)
        wait_cnt <= wait_cnt - 1'b1;
      if (fire) begin
        req_valid <= 1'b1;
        req_len   <= len_min + r;
        req_dest  <= rand_dest ? rdest : dest_base;
        issued    <= issued + 1'b1;
        if (mode == M_BURST) begin
          if (burst_cnt + 1'b1 >= burst_cfg[15:0]) begin
            burst_cnt <= '0;
            wait_cnt  <= 20'(burst_cfg[31:16]);
          end else begin
            burst_cnt <= burst_cnt + 1'b1;
          end
        end else if (mode == M_NORMAL) begin
          wait_cnt <= 20'(burst_cfg[15:0]) + (20'(nsum) << burst_cfg[19:16]);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_active <= 1'b0; b_left <= '0; b_start <= '0;
      b_last <= '0; b_sum <= '0; b_count <= '0;
    end else if (bc.clr) begin
      b_active <= 1'b0; b_left <= '0; b_last <= '0; b_sum <= '0; b_count <= '0;
    end else begin
      if (fire && mode == M_BURST && burst_cnt == 0) begin
        b_active <= 1'b1;
        b_start  <= now;
        b_left   <= (burst_cfg[15:0] == 0) ? 16'd1 : burst_cfg[15:0];
      end
      if (b_active && p_sent) begin
        b_left <= b_left - 1'b1;
        if (b_left == 1) begin
          b_active <= 1'b0;
          b_last   <= now + 1'b1 - b_start;
          b_sum    <= b_sum + (now + 1'b1 - b_start);
          b_count  <= b_count + 1'b1;
        end
      end
    end
  end

  noc_if_tx u_ni (
    .clk, .rst_n, .clr(bc.clr), .src_id(node_id), .now,
    .req_valid, .req_dest, .req_len, .req_ready,
    .link_o, .ready_i, .flit_sent(f_sent), .pkt_sent(p_sent)
  );

endmodule
