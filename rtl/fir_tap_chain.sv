// fir_tap_chain: adder and delay chain of a transposed-form FIR filter,
// y(n) = sum_i s_i * p_i(n-i), where p_i(n) = |C_i| * x(n) comes from the
// MCM block and s_i = -1 for the taps flagged in TAP_NEG, +1 otherwise.
//
// There is one register per tap: z[NTAPS-1] <= s*p[NTAPS-1] and
// z[i] <= z[i+1] + s*p[i] below it, all updated on a clock edge with en = 1
// (one update per input sample) and held otherwise. z[0] is the output y, so
// the product of the current sample enters the result after one adder and
// the chain adds one register of latency. Each tap's adder sees only its own
// product and one register, so the critical path does not grow with the
// number of taps. y is signed, ACC_W bits, wide enough for NTAPS full-scale
// products. Synchronous active-low reset clears the chain.
//
// The transposed structure follows the design; subtracting the products of
// negative coefficients (the MCM block works on magnitudes) is this design's
// choice.
module fir_tap_chain #(
  parameter int unsigned    NTAPS   = 5,       // taps
  parameter int unsigned    P_W     = 16,      // width of each product
  parameter logic [NTAPS-1:0] TAP_NEG = '0,    // bit i: coefficient i negative
  localparam int unsigned   ACC_W   = P_W + $clog2(NTAPS) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,            // one new set of products
  input  logic [P_W-1:0]          p [NTAPS],     // p[i] = |C_i| * x(n)
  output logic signed [ACC_W-1:0] y,             // filter output
  output logic                    y_valid        // y updated on the last edge
);

  logic [NTAPS-1:0][ACC_W-1:0] z;   // one register per tap
  logic signed [ACC_W-1:0] term [NTAPS];

  always_comb begin
    for (int i = 0; i < NTAPS; i++) begin
      term[i] = TAP_NEG[i] ? -$signed(ACC_W'(p[i])) : $signed(ACC_W'(p[i]));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en;
      if (en) begin
        for (int i = 0; i < NTAPS - 1; i++) z[i] <= $signed(z[i+1]) + term[i];
        z[NTAPS-1] <= term[NTAPS-1];
      end
    end
  end

  assign y = z[0];

endmodule
