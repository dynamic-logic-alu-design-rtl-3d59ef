// wallace_mult: unsigned WIDTH x WIDTH multiplier built from full and half
// adders, following the paper's multiplier figure.
//
// Step 1 forms the WIDTH*WIDTH partial products a[j] & b[i] with AND gates.
// Step 2 adds them row by row in carry-save form: each row of three-input
// full adders takes one new partial-product row, the sums of the row above
// and the carries of the row above, so a column is reduced three bits at a
// time and no carry ripples inside a row. The first row only has two
// inputs per column and uses half adders. Step 3 merges the last sum and
// carry vectors with a ripple row of adders (half adder at its right end)
// to give the upper half of the product.
//
// Row i (i = 1 .. WIDTH-1) handles the product bits of weight i .. i+WIDTH-1.
// Product bit i is the right-most sum of row i; bit 0 is a[0] & b[0].
// Purely combinational; no clock.
module wallace_mult #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  // pp[i][j] = a[j] & b[i], weight i + j
  logic [WIDTH-1:0] pp [WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_pp
    assign pp[i] = a & {WIDTH{b[i]}};
  end

  // Carry-save state after row i. sum_r[i][k] has weight i + k,
  // car_r[i][k] has weight i + k + 1, for k = 0 .. WIDTH-1.
  logic [WIDTH-1:0] sum_r [WIDTH];
  logic [WIDTH-1:0] car_r [WIDTH];

  // Row 0 is simply the first partial product row, no carries yet.
  assign sum_r[0] = pp[0];
  assign car_r[0] = '0;
  assign p[0]     = pp[0][0];

  for (genvar i = 1; i < WIDTH; i++) begin : g_row
    for (genvar k = 0; k < WIDTH; k++) begin : g_cell
      // Inputs of weight i + k: the new partial product pp[i][k], the
      // previous row's sum of weight (i-1)+(k+1) and its carry of weight
      // (i-1)+k+1. The left-most cell has no previous sum bit.
      logic s_in;
      if (k == WIDTH-1) begin : g_top
        assign s_in = 1'b0;
      end else begin : g_mid
        assign s_in = sum_r[i-1][k+1];
      end
      if (i == 1) begin : g_ha
        // first reduction row: carries are all zero, half adders suffice
        half_adder u_ha (
          .a   (pp[i][k]),
          .b   (s_in),
          .sum (sum_r[i][k]),
          .cout(car_r[i][k])
        );
      end else begin : g_fa
        full_adder u_fa (
          .a   (pp[i][k]),
          .b   (s_in),
          .cin (car_r[i-1][k]),
          .sum (sum_r[i][k]),
          .cout(car_r[i][k])
        );
      end
    end
    assign p[i] = sum_r[i][0];
  end

  // Final merging row: adds sum_r[W-1][k+1] and car_r[W-1][k] (both of
  // weight W + k) with a ripple carry, giving p[W .. 2W-1].
  localparam int unsigned L = WIDTH - 1;
  logic [WIDTH:0] fc;
  assign fc[0] = 1'b0;

  for (genvar k = 0; k < WIDTH; k++) begin : g_final
    logic s_in;
    if (k == WIDTH-1) begin : g_top
      assign s_in = 1'b0;
    end else begin : g_mid
      assign s_in = sum_r[L][k+1];
    end
    if (k == 0) begin : g_ha
      half_adder u_ha (
        .a   (s_in),
        .b   (car_r[L][k]),
        .sum (p[WIDTH+k]),
        .cout(fc[k+1])
      );
    end else begin : g_fa
      full_adder u_fa (
        .a   (s_in),
        .b   (car_r[L][k]),
        .cin (fc[k]),
        .sum (p[WIDTH+k]),
        .cout(fc[k+1])
      );
    end
  end
  // fc[WIDTH] is always zero: a WIDTH x WIDTH product fits in 2*WIDTH bits.

endmodule
