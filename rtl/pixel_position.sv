// Pixel Position: the loop counters of the pixel-region schedule.
//
// The image (NPIX_X columns by REGION_ROWS*NREGIONS rows) is computed one
// region of REGION_ROWS rows at a time. For each region every pulse visits
// every pixel of the region before the next pulse starts:
//   for region: for pulse: for iy in region rows: for ix in columns
// While ce is high and the schedule is not finished, one (pixel, pulse) pair
// is issued per cycle: its coordinates px, py (15.25 format, metres), the
// read address of the platform-position memory (the pulse number) and the
// control word. ctrl.sw marks the last pixel of the region for the current
// pulse: after it the sample memory switches to the next pulse.
//   px = -(NPIX_X-1)/2*DXDY + ix*DXDY
//   py = -(ROWS-1)/2*DXDY + (REGION_ROWS*region + iy)*DXDY
// The coordinates are kept in registers that are re-loaded with their start
// offset or stepped by DXDY (counters with synchronous load), so no
// multiplier is needed. Outputs are combinational from the counter state; the
// counters advance at the clock edge of an issuing cycle. region and pulse
// are also brought out so the caller can check sample availability.
// The schedule and the equations follow the design; the inner order
// (columns fastest) is this implementation's choice.
module pixel_position
  import bp_pkg::*;
#(
  parameter int unsigned NPIX_X      = 512,
  parameter int unsigned REGION_ROWS = 16,
  parameter int unsigned NREGIONS    = 32,
  parameter int unsigned NPULSES     = 512,
  parameter logic signed [POS_W-1:0] DXDY = DXDY_DEFAULT,
  localparam int unsigned XW = $clog2(NPIX_X),
  localparam int unsigned YW = (REGION_ROWS > 1) ? $clog2(REGION_ROWS) : 1,
  localparam int unsigned RW = (NREGIONS > 1) ? $clog2(NREGIONS) : 1,
  localparam int unsigned PW = (NPULSES > 1) ? $clog2(NPULSES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  output dist_t         px,
  output dist_t         py,
  output logic [PW-1:0] pos_addr,
  output ctrl_t         ctrl,
  output logic [RW-1:0] region,
  output logic [PW-1:0] pulse,
  output logic          done
);
  localparam int unsigned ROWS = REGION_ROWS * NREGIONS;
  localparam dist_t OFFSET_X = dist_t'(-((longint'(NPIX_X) - 1) * longint'(DXDY)) / 2);
  localparam dist_t OFFSET_Y = dist_t'(-((longint'(ROWS) - 1) * longint'(DXDY)) / 2);
  localparam dist_t REGION_STEP = dist_t'(longint'(REGION_ROWS) * longint'(DXDY));

  logic [XW-1:0] ix;
  logic [YW-1:0] iy;
  dist_t         px_q, py_q, row_base_q;
  logic          last_x, last_y, last_p, last_r, issue;

  assign last_x = (ix == XW'(NPIX_X - 1));
  assign last_y = (iy == YW'(REGION_ROWS - 1));
  assign last_p = (pulse == PW'(NPULSES - 1));
  assign last_r = (region == RW'(NREGIONS - 1));
  assign issue  = ce && !done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ix         <= '0;
      iy         <= '0;
      pulse      <= '0;
      region     <= '0;
      done       <= 1'b0;
      px_q       <= OFFSET_X;
      py_q       <= OFFSET_Y;
      row_base_q <= OFFSET_Y;
    end else if (issue) begin
      if (!last_x) begin
        ix   <= ix + 1'b1;
        px_q <= px_q + DXDY;
      end else begin
        ix   <= '0;
        px_q <= OFFSET_X;
        if (!last_y) begin
          iy   <= iy + 1'b1;
          py_q <= py_q + DXDY;
        end else begin
          iy <= '0;
          if (!last_p) begin
            pulse <= pulse + 1'b1;
            py_q  <= row_base_q;
          end else begin
            pulse      <= '0;
            row_base_q <= row_base_q + REGION_STEP;
            py_q       <= row_base_q + REGION_STEP;
            if (!last_r) region <= region + 1'b1;
            else         done   <= 1'b1;
          end
        end
      end
    end
  end

  assign px       = px_q;
  assign py       = py_q;
  assign pos_addr = pulse;
  assign ctrl.valid = issue;
  assign ctrl.sw    = issue && last_x && last_y;
endmodule
