// Integer square root, root = floor(sqrt(x)), by the restoring digit-by-digit
// method: one result bit per step, most significant first; at each step the
// trial value (4*root + 1) is subtracted from the partial remainder when it
// fits, and the result bit is 1 exactly then. The steps are unrolled into
// combinational logic.
//
// Interface: x unsigned, IN_W bits; root unsigned, ceil(IN_W/2) bits.
// Timing: purely combinational.
module isqrt #(
  parameter int unsigned IN_W = 17
) (
  input  logic [IN_W-1:0]         x,
  output logic [(IN_W+1)/2-1:0]   root
);
  localparam int unsigned OUT_W = (IN_W + 1) / 2;
  localparam int unsigned X_W   = 2 * OUT_W;     // x padded to an even width

  logic [X_W-1:0]   xp;
  logic [OUT_W+1:0] rem, trial;
  logic [OUT_W-1:0] q;

  assign xp = X_W'(x);

  always_comb begin
    rem = '0;
    q   = '0;
    for (int i = OUT_W - 1; i >= 0; i--) begin
      // Bring down the next two bits of x.
      rem   = {rem[OUT_W-1:0], xp[2*i+1], xp[2*i]};
      trial = {q, 2'b01};
      if (rem >= trial) begin
        rem = rem - trial;
        q   = {q[OUT_W-2:0], 1'b1};
      end else begin
        q   = {q[OUT_W-2:0], 1'b0};
      end
    end
    root = q;
  end
endmodule
