// cordic_phase: phase of a complex vector, theta = atan2(y, x), by counting
// fixed-angle rotations instead of dividing and looking up an arctangent.
//
// Sort: the vector is folded into the first octant (0..45 degrees) by taking
// |x| and |y| and swapping them if |y| > |x|; the three folding decisions are
// kept. Rotate: each clock the vector is turned clockwise by the fixed angle
// atan(2^-SHIFT) with one shift-and-add per component,
//   x <- x + (y >>> SHIFT),  y <- y - (x >>> SHIFT),
// and a counter counts the rotations until y <= 0 (at most MAXIT). Transfer
// function: n rotations mean the octant angle lies between (n-1) and n steps,
// so the estimate is (n - 1/2) steps (0 for n = 0); the folding decisions then
// map it back to the full circle. With SHIFT = 4 a step is 3.58 degrees and
// at most 13 rotations are needed for 45 degrees.
// SHIFT = 5 (1.79 degrees, MAXIT = 26, STEP = 326) gives the finer option;
// with the same 4 guard bits its error stays within about 1.4 degrees only
// for vectors of length 80 or more.
//
// Follows the document: sort, shift-4 rotation, iteration counter, compare
// with zero, transfer function. This design's choices: operands are widened
// by 4 fraction bits before rotating (so a short vector still turns), the
// half-step centring, the MAXIT guard and the binary-angle output (65536 per
// turn).
//
// Timing: start (one clock, while busy = 0) loads x and y on a clock edge;
// done is high for one clock, with phase valid, from the edge n + 2 clocks
// after that one (n <= MAXIT rotations, so at most 15 clocks).
module cordic_phase
  import hl1_pkg::*;
#(
  parameter int SHIFT = 4,
  parameter int MAXIT = 13,
  // atan(2^-SHIFT) in binary-angle units (65536 per turn); 651 for SHIFT = 4
  parameter int STEP  = 651
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  samp_t  x,
  input  samp_t  y,
  output logic   busy,
  output logic   done,
  output phase_t phase
);
  localparam int IW = 14;   // |value| <= 128 << 4 plus rotation growth

  typedef enum logic [1:0] {IDLE, ROTATE, XFER} state_t;
  state_t state;

  logic signed [IW-1:0] xr, yr;
  logic [4:0] n;
  logic xneg, yneg, swp;
  logic [7:0] ax, ay;

  always_comb begin
    ax = x[7] ? 8'(-x) : 8'(x);
    ay = y[7] ? 8'(-y) : 8'(y);
  end

  // Transfer function: octant estimate back to the full circle.
  function automatic phase_t xfer(input logic [4:0] cnt, input logic s,
                                  input logic xn, input logic yn);
    logic signed [31:0] a;
    a = (cnt == 0) ? 0 : 32'(cnt) * STEP - STEP / 2;
    if (s)  a = 16384 - a;
    if (xn) a = 32768 - a;
    if (yn) a = -a;
    return a[15:0];
  endfunction

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; xr <= '0; yr <= '0; n <= '0;
      xneg <= 1'b0; yneg <= 1'b0; swp <= 1'b0; done <= 1'b0; phase <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          xneg <= x[7];
          yneg <= y[7];
          swp  <= (ay > ax);
          xr   <= IW'((ay > ax) ? ay : ax) <<< 4;
          yr   <= IW'((ay > ax) ? ax : ay) <<< 4;
          n    <= '0;
          state <= ROTATE;
        end
        ROTATE: begin
          if (yr <= 0 || n == 5'(MAXIT)) state <= XFER;
          else begin
            xr <= xr + (yr >>> SHIFT);
            yr <= yr - (xr >>> SHIFT);
            n  <= n + 1'b1;
          end
        end
        XFER: begin
          phase <= xfer(n, swp, xneg, yneg);
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
