// cordic: pipelined CORDIC, in rotation or vectoring mode.
//
// Angles are 16-bit two's complement fractions of a turn (65536 = 2*pi, 16384 = 90 deg).
// Rotation (VECTORING = 0): (x, y) is rotated by z. A first stage folds z into +-90 deg by
// an optional 180 deg turn, 16 micro-rotation stages follow, and a last stage removes the
// CORDIC gain (x 0.607253, Q15 constant 19898), so the output has the input's magnitude.
// Vectoring (VECTORING = 1): the stages drive y to zero and accumulate the angle, giving
// zo = atan2(y, x); xo is the magnitude (also gain-corrected).
// Arctangent table: atan(2^-i) * 65536 / (2*pi), rounded, i = 0..15.
// Timing: 18 enabled clocks of latency, one input per enabled clock.
module cordic #(
  parameter int unsigned W         = 18,   // data width
  parameter bit          VECTORING = 1'b0
) (
  input  logic                clk,
  input  logic                en,
  input  logic signed [W-1:0] xi,
  input  logic signed [W-1:0] yi,
  input  logic signed [15:0]  zi,
  output logic signed [W-1:0] xo,
  output logic signed [W-1:0] yo,
  output logic signed [15:0]  zo
);
  localparam int unsigned ST = 16;
  localparam logic signed [15:0] ATAN [ST] = '{
    16'sd8192, 16'sd4836, 16'sd2555, 16'sd1297, 16'sd651, 16'sd326, 16'sd163, 16'sd81,
    16'sd41, 16'sd20, 16'sd10, 16'sd5, 16'sd3, 16'sd1, 16'sd1, 16'sd0
  };
  localparam int unsigned WX = W + 2;   // guard bits for the CORDIC gain

  logic signed [WX-1:0] x [ST+1];
  logic signed [WX-1:0] y [ST+1];
  logic signed [15:0]   z [ST+1];

  // stage 0: fold into the right half plane / +-90 deg
  always_ff @(posedge clk) begin
    if (en) begin
      if (VECTORING) begin
        if (xi < 0) begin
          x[0] <= -WX'(xi);  y[0] <= -WX'(yi);  z[0] <= 16'sh8000;
        end else begin
          x[0] <= WX'(xi);   y[0] <= WX'(yi);   z[0] <= '0;
        end
      end else begin
        if (zi > 16'sd16384 || zi < -16'sd16384) begin
          x[0] <= -WX'(xi);  y[0] <= -WX'(yi);  z[0] <= zi + 16'sh8000;
        end else begin
          x[0] <= WX'(xi);   y[0] <= WX'(yi);   z[0] <= zi;
        end
      end
    end
  end

  for (genvar i = 0; i < ST; i++) begin : g_it
    logic dir;   // 1: rotate counter-clockwise
    assign dir = VECTORING ? (y[i] < 0) : (z[i] >= 0);
    always_ff @(posedge clk) begin
      if (en) begin
        if (dir) begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - ATAN[i];
        end else begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + ATAN[i];
        end
      end
    end
  end

  // gain correction
  logic signed [WX+15:0] xg, yg;
  assign xg = x[ST] * 16'sd19898;
  assign yg = y[ST] * 16'sd19898;

  function automatic logic signed [W-1:0] satw(logic signed [WX+15:0] v);
    logic signed [WX+15:0] mx, mn;
    mx = (WX+16)'((1 << (W - 1)) - 1);
    mn = -mx - 1;
    if (v > mx) return W'(mx);
    if (v < mn) return W'(mn);
    return W'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (en) begin
      xo <= satw((xg + (WX+16)'(16384)) >>> 15);
      yo <= satw((yg + (WX+16)'(16384)) >>> 15);
      zo <= z[ST];
    end
  end
endmodule
