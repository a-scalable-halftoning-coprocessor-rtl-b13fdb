// sequencer: coordinates the halftoning of one page.
//
// For every output scanline it waits until the source scanline the line maps
// onto is present in the source buffer, starts the threshold walker and the
// gray pipeline on that line, lets groups flow until ImDstW/LANES groups
// have been compared, has the shift register flush the last partial byte,
// and then steps to the next scanline. Which source scanline an output
// scanline uses comes from the same error-term recurrence as the horizontal
// mapping (a one-lane bres_stepper), applied once per output scanline.
//
// Source scanlines live in two 1024-word slots of the source buffer, used
// alternately (row j in slot j mod 2). The host is asked for a new row with
// IRQ_A while a slot is free and rows remain; it writes the row into slot
// (rows supplied so far) mod 2 and confirms with the LINE_READY command.
// A slot is freed as soon as the output scanlines move past its row.
// in_req (InputBufferRequest) is high while the page is held up waiting for
// a row. A scanline whose width is not a multiple of LANES ends with a
// partial group: lane_mask marks the lanes of the current group that lie
// inside the line, so the others can be written as white. The published
// architecture gives the sequencer's duties (pixel boundaries, addressing,
// interrupts); the slot protocol, the state machine, the partial last group
// and the use of the same scale factor vertically are this design's
// choices.
module sequencer
  import ht_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  cfg_t                    cfg,
  input  logic                    cmd_start,
  input  logic                    cmd_line_ready,
  input  logic                    cmd_abort,
  input  logic                    fire,        // one group compared
  input  logic                    sr_empty,
  input  logic                    pk_idle,
  output logic                    page_start,
  output logic                    line_start,
  output logic [SRC_AW-1:0]       slot_base,
  output logic [DIM_W-1:0]        line_groups,
  output logic [LANES-1:0]        lane_mask,
  output logic signed [EPS_W-1:0] eps0,
  output logic [DIM_W-1:0]        scale_r,
  output logic                    running,
  output logic                    flush,
  output logic                    busy,
  output logic                    done,
  output logic                    irq_a,
  output logic                    in_req,
  output logic [DIM_W-1:0]        dst_y,
  output logic [DIM_W-1:0]        src_row
);

  typedef enum logic [2:0] {
    S_IDLE, S_WAIT_SRC, S_RUN, S_FLUSH, S_NEXT, S_DRAIN, S_DONE
  } state_e;

  state_e                  state;
  logic [1:0]              slot_valid;
  logic [DIM_W-1:0]        rows_supplied;
  logic [DIM_W-1:0]        groups;
  logic signed [EPS_W-1:0] eps_v;
  logic signed [EPS_W-1:0] eps_v_nxt;
  logic                    v_adv;
  logic [0:0]              v_adv_unused;

  assign scale_r     = cfg.scale_d - cfg.scale_s;
  assign eps0        = -signed'(EPS_W'(scale_r >> 1));
  assign line_groups = DIM_W'(({1'b0, cfg.dst_w} + (DIM_W+1)'(LANES - 1)) / (DIM_W+1)'(LANES));

  // lanes of the current group that lie inside the scanline (all of them
  // except in the last group of a line whose width is not a multiple of
  // LANES)
  always_comb
    for (int i = 0; i < LANES; i++)
      lane_mask[i] = (32'(groups) * LANES + 32'(i)) < 32'(cfg.dst_w);
  assign slot_base   = {src_row[0], {SLOT_AW{1'b0}}};
  assign running     = (state == S_RUN);
  assign flush       = (state == S_FLUSH);
  assign busy        = (state != S_IDLE) && (state != S_DONE);
  assign done        = (state == S_DONE);
  assign in_req      = (state == S_WAIT_SRC) && !slot_valid[src_row[0]];
  assign irq_a       = busy && (rows_supplied < cfg.src_h) &&
                       !slot_valid[rows_supplied[0]];

  // vertical mapping: eps_v is the error term of output scanline dst_y
  bres_stepper #(.LANES(1)) u_vstep (
    .eps_in (eps_v),
    .scale_s(cfg.scale_s),
    .scale_r(scale_r),
    .first  (1'b1),
    .adv    (v_adv_unused),
    .eps_out(eps_v_nxt)
  );
  // scanline dst_y+1 starts a new row (the lane output is forced low by
  // 'first' and not used)
  assign v_adv = (eps_v_nxt >= 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      slot_valid    <= '0;
      rows_supplied <= '0;
      groups        <= '0;
      eps_v         <= '0;
      dst_y         <= '0;
      src_row       <= '0;
      page_start    <= 1'b0;
      line_start    <= 1'b0;
    end else begin
      page_start <= 1'b0;
      line_start <= 1'b0;
      if (cmd_line_ready && busy && rows_supplied < cfg.src_h &&
          !slot_valid[rows_supplied[0]]) begin
        slot_valid[rows_supplied[0]] <= 1'b1;
        rows_supplied                <= rows_supplied + DIM_W'(1);
      end
      if (cmd_abort) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE, S_DONE: if (cmd_start) begin
            state         <= S_WAIT_SRC;
            slot_valid    <= '0;
            rows_supplied <= '0;
            eps_v         <= eps0;
            dst_y         <= '0;
            src_row       <= '0;
            page_start    <= 1'b1;
          end
          S_WAIT_SRC: if (slot_valid[src_row[0]] && !page_start) begin
            line_start <= 1'b1;
            groups     <= '0;
            state      <= S_RUN;
          end
          S_RUN: begin
            if (fire) groups <= groups + DIM_W'(1);
            if (groups + DIM_W'(fire) == line_groups) state <= S_FLUSH;
          end
          S_FLUSH: if (sr_empty) state <= S_NEXT;
          S_NEXT: begin
            if (dst_y + DIM_W'(1) >= cfg.dst_h) begin
              state <= S_DRAIN;
            end else begin
              dst_y <= dst_y + DIM_W'(1);
              eps_v <= eps_v_nxt;
              if (v_adv) begin
                slot_valid[src_row[0]] <= 1'b0;
                src_row                <= src_row + DIM_W'(1);
              end
              state <= S_WAIT_SRC;
            end
          end
          S_DRAIN: if (pk_idle) begin
            state      <= S_DONE;
            slot_valid <= '0;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // Groups are compared only while a line runs, and never more than the
  // line holds.
  a_fire_running: assert property (@(posedge clk) disable iff (!rst_n)
    fire |-> running);
  a_fire_bound: assert property (@(posedge clk) disable iff (!rst_n)
    running |-> groups < line_groups);

endmodule
