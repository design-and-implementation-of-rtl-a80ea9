// cordic_rotator: pipelined CORDIC in rotation mode.
//
// Rotates the vector (x_in, y_in) by the angle z_in and returns the rotated
// vector scaled by the CORDIC gain K = prod(sqrt(1 + 2^-2i)) ~ 1.6468.
// Each pipeline stage performs one iteration of the classic recurrence
//     x(i+1) = x(i) - d(i) * y(i) * 2^-i
//     y(i+1) = y(i) + d(i) * x(i) * 2^-i
//     z(i+1) = z(i) - d(i) * atan(2^-i)
// which is the iteration the document gives for its NCO. The document decides
// d(i) from the sign of y(i) and starts at i = 1; here d(i) = +1 when the
// residual angle z(i) >= 0 and -1 otherwise, starting at i = 0, because that
// is the choice that makes the recurrence rotate by z_in and so produce a
// sine and a cosine, which is what the NCO needs. A first stage folds angles
// in [pi/2, 3pi/2) into the convergence range by negating the vector and
// subtracting pi, so any full-turn angle is accepted.
//
// Interface: z_in is an unsigned fraction of a full turn (2^PHASE_W = 2*pi).
// x_in/y_in and x_out/y_out are signed W-bit samples; the outputs saturate.
// Timing: fully pipelined, one new angle per clock, LATENCY = ITER + 1 cycles.
// rst_n is a synchronous, active-low reset that clears the pipeline.
module cordic_rotator #(
  parameter int unsigned W       = 16,  // sample width
  parameter int unsigned PHASE_W = 16,  // angle width (full turn)
  parameter int unsigned ITER    = 14,  // CORDIC iterations / pipeline stages
  parameter int unsigned GUARD   = 2    // extra integer bits inside the pipeline
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [W-1:0]        x_in,
  input  logic signed [W-1:0]        y_in,
  input  logic        [PHASE_W-1:0]  z_in,
  output logic signed [W-1:0]        x_out,
  output logic signed [W-1:0]        y_out
);

  localparam int unsigned XW = W + GUARD;       // x/y pipeline width
  localparam int unsigned ZW = PHASE_W + 2;     // residual angle width

  // atan(2^-i) in units of 2*pi / 2^ZW, rounded.
  function automatic logic signed [ZW-1:0] atan_code(input int i);
    real a;
    a = $atan(1.0 / (2.0 ** i)) / (2.0 * 3.14159265358979323846) * (2.0 ** ZW);
    return ZW'($rtoi(a + 0.5));
  endfunction

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];

  // Stage 0: quadrant folding.
  logic                 fold;
  logic [PHASE_W-1:0]   z_fold;
  always_comb begin
    fold   = z_in[PHASE_W-1] ^ z_in[PHASE_W-2];          // angle in [pi/2, 3pi/2)
    z_fold = z_in ^ (PHASE_W'(fold) << (PHASE_W-1));     // subtract pi when folding
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
    end else begin
      xs[0] <= fold ? -XW'(x_in) : XW'(x_in);
      ys[0] <= fold ? -XW'(y_in) : XW'(y_in);
      zs[0] <= {z_fold, 2'b00};
    end
  end

  // Stages 1..ITER: one CORDIC iteration each.
  for (genvar i = 0; i < ITER; i++) begin : g_stage
    localparam logic signed [ZW-1:0] ATAN = atan_code(i);
    logic d_pos;
    assign d_pos = !zs[i][ZW-1];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
      end else if (d_pos) begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - ATAN;
      end else begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + ATAN;
      end
    end
  end

  // Saturate to the output width.
  function automatic logic signed [W-1:0] sat(input logic signed [XW-1:0] v);
    localparam logic signed [XW-1:0] MAXV = XW'((2 ** (W-1)) - 1);
    localparam logic signed [XW-1:0] MINV = -XW'(2 ** (W-1));
    if (v > MAXV)      return W'(MAXV);
    else if (v < MINV) return W'(MINV);
    else               return W'(v);
  endfunction

  assign x_out = sat(xs[ITER]);
  assign y_out = sat(ys[ITER]);

endmodule
