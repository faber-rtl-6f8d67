// affine_transform: streaming affine warp of the floating image.
//
// For every output pixel (x, y), in raster order, the source position is
//   xs = m00*x + m01*y + m02 ,  ys = m10*x + m11*y + m12
// (Q16.16 coefficients: the matrix maps output to input coordinates, i.e.
// it is the inverse of the registration transform, as the host supplies it)
// and the output is the input pixel nearest to (xs, ys) or the bilinear
// blend of the four around it (8-bit weights). Positions outside the image
// read as 0.
//
// The input image arrives one pixel per cycle, row by row, on in_valid/
// in_data/in_ready and is kept in a circular buffer of STORE_ROWS rows. Output
// row y is produced once START_ROWS rows beyond it have arrived (rows up to
// y + START_ROWS - 1), and it may use source rows
//   y + START_ROWS - STORE_ROWS + 1  ..  y + START_ROWS - 1 ;
// rows outside that window read as 0 (so rotations and vertical shifts are
// limited to about STORE_ROWS/2 rows). While row y is produced, input row
// y + START_ROWS streams into the slot the window has just left, so once the
// buffer is primed the unit consumes and produces one pixel per cycle: a frame
// takes about (DIM + START_ROWS) * DIM cycles.
// The buffer is split into four banks by row and column parity, so the four
// bilinear taps are four single-port reads in one cycle.
// Pipeline: coordinates (stage 1), tap addresses and bank reads (stage 2),
// blend (output register), stalled as a whole by out_ready.
// matrix and interp are sampled with the first pixel of each frame.
//
// From the source: one pixel per cycle, a 100-row input buffer filled before
// computing starts, nearest-neighbour and bilinear modes, output streamed to
// the metric. This design's choices: START_ROWS = 50 (a window centred on the
// output row), Q16.16 coefficients, 8-bit interpolation weights, zero border.
module affine_transform
  import faber_pkg::*;
#(
  parameter int unsigned DIM        = 512,
  parameter int unsigned B          = 8,
  parameter int unsigned STORE_ROWS = 100,
  parameter int unsigned START_ROWS = 50
) (
  input  logic         clk,
  input  logic         rst_n,
  input  affine_t      matrix,
  input  interp_e      interp,
  input  logic         in_valid,
  input  logic [B-1:0] in_data,
  output logic         in_ready,
  output logic         out_valid,
  output logic [B-1:0] out_data,
  input  logic         out_ready
);
  localparam int unsigned CW  = $clog2(DIM + 1);
  localparam int unsigned SW  = $clog2(STORE_ROWS);
  localparam int unsigned HR  = STORE_ROWS / 2;
  localparam int unsigned HC  = DIM / 2;
  localparam int unsigned PW  = 48;   // width of the source coordinates
  localparam int unsigned FW  = 8;    // interpolation weight bits

  typedef logic signed [PW-1:0] pos_t;

  // ---------------- input side ----------------
  logic [B-1:0]  mem [2][2][HR][HC];
  logic [CW-1:0] in_row, in_col, rows_done;
  logic [SW-1:0] in_slot;
  logic          take;
  affine_t       m_q;
  interp_e       interp_q;

  // ---------------- output counters ----------------
  logic [CW-1:0] ox, oy;
  logic [SW-1:0] oslot;            // slot of row oy
  logic          adv, emit, rows_ok;

  // Stage 1 registers
  logic          v1;
  logic [CW-1:0] y1;
  logic [SW-1:0] slot1;
  pos_t          xs1, ys1;
  // Stage 2 registers
  logic          v2;
  logic [FW-1:0] fx2, fy2;
  logic [3:0]    ok2;            // tap valid: 00, 01, 10, 11
  logic          rp2, cp2;       // parity of the top-left tap
  logic [B-1:0]  q [2][2];       // bank read data

  // Oldest row still to be read. A stage-1 pixel that advances this cycle
  // reads the banks at the same edge as the input write, and the banks are
  // read-first, so only a stalled stage-1 pixel holds the window back.
  logic [CW-1:0] y_lo;
  assign y_lo = (v1 && !adv) ? y1 : oy;

  assign rows_ok  = (rows_done >= CW'(DIM)) || (rows_done >= oy + CW'(START_ROWS));
  assign adv      = !out_valid || out_ready;
  assign emit     = adv && rows_ok && (oy < CW'(DIM));
  assign in_ready = (in_row < CW'(DIM)) && ({1'b0, in_row} <= {1'b0, y_lo} + (CW+1)'(START_ROWS));
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (take) mem[in_row[0]][in_col[0]][in_slot >> 1][in_col >> 1] <= in_data;
  end

  // ---------------- stage 1 -> 2: taps and bank reads ----------------
  logic signed [PW-1:0] xr, yr;    // integer tap (top-left for bilinear)
  logic [FW-1:0]        fx, fy;
  logic signed [PW-1:0] lo_row, hi_row;
  logic [3:0]           ok;
  logic [SW-1:0]        s0, s1;    // slots of rows yr and yr+1
  logic                 rp, cp;

  always_comb begin
    pos_t xa, ya, dy;
    if (interp_q == INTERP_NEAREST) begin
      xa = xs1 + pos_t'(1 << (COEF_FRAC - 1));
      ya = ys1 + pos_t'(1 << (COEF_FRAC - 1));
      fx = '0;
      fy = '0;
    end else begin
      xa = xs1;
      ya = ys1;
      fx = xs1[COEF_FRAC-1 -: FW];
      fy = ys1[COEF_FRAC-1 -: FW];
    end
    xr = xa >>> COEF_FRAC;
    yr = ya >>> COEF_FRAC;
    lo_row = pos_t'(y1) + pos_t'(START_ROWS) - pos_t'(STORE_ROWS) + 1;
    hi_row = pos_t'(y1) + pos_t'(START_ROWS) - 1;
    if (lo_row < 0) lo_row = 0;
    if (hi_row > pos_t'(DIM - 1)) hi_row = pos_t'(DIM - 1);
    for (int i = 0; i < 4; i++) begin
      pos_t tr, tc;
      tr = yr + pos_t'(i / 2);
      tc = xr + pos_t'(i % 2);
      ok[i] = (tr >= lo_row) && (tr <= hi_row) && (tc >= 0) && (tc <= pos_t'(DIM - 1));
    end
    // slot of row yr = slot of row y1 + (yr - y1), folded into 0..STORE_ROWS-1
    dy = yr - pos_t'(y1);
    begin
      pos_t s;
      s = pos_t'(slot1) + dy;
      if (s < 0) s = s + pos_t'(STORE_ROWS);
      else if (s >= pos_t'(STORE_ROWS)) s = s - pos_t'(STORE_ROWS);
      s0 = SW'(s);
    end
    s1 = (s0 == SW'(STORE_ROWS - 1)) ? '0 : s0 + 1'b1;
    rp = yr[0];
    cp = xr[0];
  end

  always_ff @(posedge clk) begin
    if (adv && v1) begin
      for (int br = 0; br < 2; br++)
        for (int bc = 0; bc < 2; bc++) begin
          logic [SW-1:0] sl;
          logic [PW-1:0] cc;
          sl = (rp == br[0]) ? s0 : s1;
          cc = (cp == bc[0]) ? xr : xr + 1;
          q[br][bc] <= mem[br][bc][sl >> 1][cc[CW-1:1]];
        end
    end
  end

  // ---------------- blend ----------------
  logic [B-1:0]        t00, t01, t10, t11;
  logic [B+FW:0]       top, bot;
  logic [B+2*FW+1:0]   mix;

  always_comb begin
    t00 = ok2[0] ? q[rp2][cp2]   : '0;
    t01 = ok2[1] ? q[rp2][!cp2]  : '0;
    t10 = ok2[2] ? q[!rp2][cp2]  : '0;
    t11 = ok2[3] ? q[!rp2][!cp2] : '0;
    top = (B+FW+1)'(t00) * ((B+FW+1)'(1 << FW) - fx2) + (B+FW+1)'(t01) * fx2;
    bot = (B+FW+1)'(t10) * ((B+FW+1)'(1 << FW) - fx2) + (B+FW+1)'(t11) * fx2;
    mix = (B+2*FW+2)'(top) * ((B+2*FW+2)'(1 << FW) - fy2) + (B+2*FW+2)'(bot) * fy2
        + (B+2*FW+2)'(1 << (2*FW - 1));
  end

  // ---------------- control and pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_row <= '0; in_col <= '0; in_slot <= '0; rows_done <= '0;
      m_q <= '0; interp_q <= INTERP_NEAREST;
      ox <= '0; oy <= '0; oslot <= '0;
      v1 <= 1'b0; y1 <= '0; slot1 <= '0; xs1 <= '0; ys1 <= '0;
      v2 <= 1'b0; fx2 <= '0; fy2 <= '0; ok2 <= '0; rp2 <= 1'b0; cp2 <= 1'b0;
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      // input
      if (take) begin
        if (in_row == '0 && in_col == '0) begin
          m_q      <= matrix;
          interp_q <= interp;
        end
        if (in_col == CW'(DIM - 1)) begin
          in_col    <= '0;
          in_row    <= in_row + 1'b1;
          rows_done <= rows_done + 1'b1;
          in_slot   <= (in_slot == SW'(STORE_ROWS - 1)) ? '0 : in_slot + 1'b1;
        end else begin
          in_col <= in_col + 1'b1;
        end
      end
      if (adv) begin
        // stage 0 -> 1: source coordinates
        v1 <= emit;
        if (emit) begin
          y1    <= oy;
          slot1 <= oslot;
          xs1   <= pos_t'(m_q.m00) * pos_t'(ox) + pos_t'(m_q.m01) * pos_t'(oy) + pos_t'(m_q.m02);
          ys1   <= pos_t'(m_q.m10) * pos_t'(ox) + pos_t'(m_q.m11) * pos_t'(oy) + pos_t'(m_q.m12);
          if (ox == CW'(DIM - 1)) begin
            ox    <= '0;
            oy    <= oy + 1'b1;
            oslot <= (oslot == SW'(STORE_ROWS - 1)) ? '0 : oslot + 1'b1;
          end else begin
            ox <= ox + 1'b1;
          end
        end
        // stage 1 -> 2
        v2  <= v1;
        fx2 <= fx;
        fy2 <= fy;
        ok2 <= ok;
        rp2 <= rp;
        cp2 <= cp;
        // stage 2 -> output
        out_valid <= v2;
        out_data  <= B'(mix >> (2*FW));
      end
      // Frame finished: the last pixel has left the counters and the
      // coordinate stage; start over for the next frame.
      if (oy == CW'(DIM) && !v1 && adv) begin
        oy <= '0; oslot <= '0;
        in_row <= '0; in_slot <= '0; rows_done <= '0;
      end
    end
  end

  // A stalled output holds its pixel.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
