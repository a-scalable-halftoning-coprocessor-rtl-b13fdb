// ctrl_regs: host interface of the coprocessor.
//
// The host writes the page constants (output image size ImDstW x ImDstH, the
// scale fraction d/s, the number of source scanlines and the description of the
// threshold array) into 16-bit registers before a page, and talks to the
// running coprocessor through the 8-bit control register at REG_CTRL. Writing
// REG_CTRL produces one-clock command strobes (START, LINE_READY, ABORT);
// reading it returns the 8 status bits. The constants are ignored while the
// coprocessor is busy so that a page always sees one consistent configuration.
// The published architecture names the 8-bit control register and the constants
// sent at initialization time; the register map, the command and status bits
// and the bus itself are this design's choices.
//
// Bus timing: a write takes effect at the clock edge where hwrite is high;
// hrdata is combinational from haddr.
module ctrl_regs
  import ht_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hwrite,
  input  logic [3:0]  haddr,
  input  logic [15:0] hwdata,
  output logic [15:0] hrdata,
  input  logic [7:0]  status,
  input  logic        busy,
  output cfg_t        cfg,
  output logic        cmd_start,
  output logic        cmd_line_ready,
  output logic        cmd_abort
);

  reg_addr_e addr;
  logic      wr_cfg;

  assign addr   = reg_addr_e'(haddr);
  assign wr_cfg = hwrite && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg            <= '0;
      cmd_start      <= 1'b0;
      cmd_line_ready <= 1'b0;
      cmd_abort      <= 1'b0;
    end else begin
      cmd_start      <= hwrite && addr == REG_CTRL && hwdata[CMD_START] && !busy;
      cmd_line_ready <= hwrite && addr == REG_CTRL && hwdata[CMD_LINE_READY];
      cmd_abort      <= hwrite && addr == REG_CTRL && hwdata[CMD_ABORT];
      if (wr_cfg) begin
        case (addr)
          REG_DST_W:      cfg.dst_w      <= hwdata;
          REG_DST_H:      cfg.dst_h      <= hwdata;
          REG_SCALE_D:    cfg.scale_d    <= hwdata;
          REG_SCALE_S:    cfg.scale_s    <= hwdata;
          REG_SRC_H:      cfg.src_h      <= hwdata;
          REG_THR_BASE_L: cfg.thr_base[15:0] <= hwdata;
          REG_THR_BASE_H: cfg.thr_base[THR_AW-1:16] <= hwdata[THR_AW-17:0];
          REG_ROW_PITCH:  cfg.row_pitch  <= hwdata;
          REG_TILE_ROWS:  cfg.tile_rows  <= hwdata;
          REG_TILE_COLS:  cfg.tile_cols  <= hwdata;
          REG_TILE_SHIFT: cfg.tile_shift <= hwdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (addr)
      REG_CTRL:       hrdata = {8'h00, status};
      REG_DST_W:      hrdata = cfg.dst_w;
      REG_DST_H:      hrdata = cfg.dst_h;
      REG_SCALE_D:    hrdata = cfg.scale_d;
      REG_SCALE_S:    hrdata = cfg.scale_s;
      REG_SRC_H:      hrdata = cfg.src_h;
      REG_THR_BASE_L: hrdata = cfg.thr_base[15:0];
      REG_THR_BASE_H: hrdata = 16'(cfg.thr_base[THR_AW-1:16]);
      REG_ROW_PITCH:  hrdata = cfg.row_pitch;
      REG_TILE_ROWS:  hrdata = cfg.tile_rows;
      REG_TILE_COLS:  hrdata = cfg.tile_cols;
      REG_TILE_SHIFT: hrdata = cfg.tile_shift;
      default:        hrdata = '0;
    endcase
  end

endmodule
