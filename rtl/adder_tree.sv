// adder_tree: combinational sum of N signed W-bit terms, added two by two in
// a balanced tree: with N = 8, four adders, then two, then one. N that is not
// a power of two is padded with zero terms up to the next power of two. Each
// adder keeps W bits (the sum wraps modulo 2^W), as the published parallel
// circuit keeps 32 bits throughout. No clock: the caller registers the sum.
module adder_tree #(
  parameter int N = fir_pkg::TAPS,
  parameter int W = fir_pkg::ACC_W
) (
  input  logic signed [W-1:0] terms [N],
  output logic signed [W-1:0] sum
);

  localparam int LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int WIDTH0 = 1 << LEVELS;

  // lvl[l] holds the WIDTH0 >> l partial sums of level l.
  logic signed [W-1:0] lvl [LEVELS+1][WIDTH0];

  always_comb begin
    for (int i = 0; i < WIDTH0; i++) lvl[0][i] = (i < N) ? terms[i] : '0;
    for (int l = 1; l <= LEVELS; l++) begin
      for (int i = 0; i < WIDTH0; i++) begin
        if (i < (WIDTH0 >> l)) lvl[l][i] = lvl[l-1][2*i] + lvl[l-1][2*i+1];
        else                   lvl[l][i] = '0;
      end
    end
  end

  assign sum = lvl[LEVELS][0];

endmodule
