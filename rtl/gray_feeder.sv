// gray_feeder: two-level pipeline and multiplexing logic that hands LANES
// gray pixels per clock to the comparators.
//
// Level one reads 32-bit words (four 8-bit gray pixels) of the current
// source scanline from the source scanline buffer, one word per clock with
// one clock of read latency. Level two is a short queue of words ahead of
// the comparators. Each clock a bres_stepper maps the next LANES destination
// pixels onto source pixel indices; a multiplexer picks those pixels out of
// the queued words. When every picked pixel is present the group is valid;
// taking it advances the error term and drops the words that no destination
// pixel will need again. A source pixel thus feeds as many neighbouring
// destination pixels as the scale factor asks for (for example one
// source pixel spread over 5 x 5 output pixels at d/s = 5/1).
//
// The published architecture gives the purpose (two-level pipeline, mapping
// logic before the comparators); the queue depth, the word-credit read control
// and the pixel order inside a word (pixel 0 in bits 7:0) are this design's
// choices. Reads never run past the end of the 1024-word slot. The queue has
// enough words for any LANES up to 8 when d >= s; with more lanes than one word
// per clock can feed, groups are simply valid less often (the input-rate limit
// the published architecture discusses for eight comparators).
//
// Interface: line_start (one clock) restarts at pixel 0 of the scanline held
// in the slot at slot_base; grp_valid/grp_take is a valid/ready pair for the
// gray group gray[0..LANES-1], lane 0 being the leftmost destination pixel.
module gray_feeder
  import ht_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    line_start,
  input  logic [SRC_AW-1:0]       slot_base,
  input  logic signed [EPS_W-1:0] eps0,
  input  logic [DIM_W-1:0]        scale_s,
  input  logic [DIM_W-1:0]        scale_r,
  // source scanline buffer read port (data one clock after mem_re)
  output logic                    mem_re,
  output logic [SRC_AW-1:0]       mem_addr,
  input  logic [SRC_WORD_W-1:0]   mem_rdata,
  // gray group towards the comparators
  output logic                    grp_valid,
  output gray_t                   gray [LANES],
  input  logic                    grp_take
);

  localparam int unsigned PPW        = PIX_PER_WORD;
  localparam int unsigned WW         = (LANES + 2 * PPW - 2) / PPW;
  localparam int unsigned QD         = WW + 2;
  localparam int unsigned QCW        = $clog2(QD + 1);
  localparam int unsigned SLOT_WORDS = 1 << SLOT_AW;
  localparam int unsigned SW         = DIM_W + 1;   // source pixel index width

  logic [SRC_WORD_W-1:0]   q [QD];
  logic [SRC_WORD_W-1:0]   q_nxt [QD];
  logic [QCW-1:0]          count;
  logic                    inflight;
  logic [SLOT_AW:0]        fetch_idx;
  logic [SW-1:0]           wbase;      // word index of q[0] in the scanline
  logic [SW-1:0]           cur_src;    // source pixel of the previous pixel
  logic                    first;
  logic signed [EPS_W-1:0] eps;
  logic signed [EPS_W-1:0] eps_nxt;
  logic [LANES-1:0]        adv;
  logic [SW-1:0]           src [LANES];
  logic [SW-1:0]           last_word;
  logic [QCW-1:0]          drop;
  logic                    take;

  bres_stepper #(.LANES(LANES)) u_step (
    .eps_in (eps),
    .scale_s(scale_s),
    .scale_r(scale_r),
    .first  (first),
    .adv    (adv),
    .eps_out(eps_nxt)
  );

  // Pixel-to-boundary mapping and multiplexer.
  always_comb begin
    logic [SW-1:0] acc;
    logic [SW-1:0] rel;
    logic [SW-1:0] need;
    acc = cur_src;
    for (int i = 0; i < LANES; i++) begin
      acc    = acc + SW'(adv[i]);
      src[i] = acc;
    end
    last_word = src[LANES-1] / SW'(PPW);
    need      = last_word - wbase + SW'(1);
    grp_valid = (need <= SW'(count));
    for (int i = 0; i < LANES; i++) begin
      rel     = src[i] - wbase * SW'(PPW);
      gray[i] = '0;
      for (int k = 0; k < QD; k++)
        if (rel / SW'(PPW) == SW'(k))
          gray[i] = q[k][int'(rel % SW'(PPW)) * GRAY_W +: GRAY_W];
    end
  end

  assign take = grp_take && grp_valid;
  assign drop = take ? QCW'(last_word - wbase) : '0;

  // Word credit: issue a read when the queue will still have room for it.
  always_comb begin
    int unsigned room;
    room     = QD + int'(drop) - int'(count) - int'(inflight);
    mem_re   = !line_start && (room > 0) && (fetch_idx < (SLOT_AW+1)'(SLOT_WORDS));
    mem_addr = slot_base | SRC_AW'(fetch_idx);
  end

  always_comb begin
    for (int k = 0; k < QD; k++)
      q_nxt[k] = (k + int'(drop) < QD) ? q[k + int'(drop)] : '0;
    for (int k = 0; k < QD; k++)
      if (inflight && int'(count) - int'(drop) == k)
        q_nxt[k] = mem_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      inflight  <= 1'b0;
      fetch_idx <= '0;
      wbase     <= '0;
      cur_src   <= '0;
      first     <= 1'b1;
      eps       <= '0;
      for (int k = 0; k < QD; k++) q[k] <= '0;
    end else if (line_start) begin
      count     <= '0;
      inflight  <= 1'b0;
      fetch_idx <= '0;
      wbase     <= '0;
      cur_src   <= '0;
      first     <= 1'b1;
      eps       <= eps0;
    end else begin
      q         <= q_nxt;
      count     <= count - drop + QCW'(inflight);
      inflight  <= mem_re;
      fetch_idx <= fetch_idx + (SLOT_AW+1)'(mem_re);
      if (take) begin
        eps     <= eps_nxt;
        cur_src <= src[LANES-1];
        first   <= 1'b0;
        wbase   <= wbase + SW'(drop);
      end
    end
  end

  // The word queue never overflows.
  a_queue_bound: assert property (@(posedge clk) disable iff (!rst_n)
    int'(count) <= QD);

endmodule
