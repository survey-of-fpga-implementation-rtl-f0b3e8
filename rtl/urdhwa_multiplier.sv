// urdhwa_multiplier: unsigned WIDTH x WIDTH multiplier in the Urdhva-
// Tiryakbhyam ("vertically and crosswise") style, with its columns summed by
// 7:2 and 4:2 compressors.
//
// Crosswise step: column k of the product collects every partial product
// a[i] & b[j] with i + j == k, all of weight 2^k (at most WIDTH of them).
// The columns are then summed in three steps, all combinational:
//   1. Each column k feeds its partial products (padded with zeros to nine)
//      into one 7:2 compressor. It leaves a bit of weight 2^k, one of weight
//      2^(k+1) and two of weight 2^(k+2).
//   2. Each column k now holds four bits: its own 7:2 sum, the 7:2 carry of
//      column k-1 and the two weight-4 outputs of column k-2. A 4:2
//      compressor adds them; its cin is the cout of column k-1's 4:2, so the
//      4:2 compressors form one row with no rippling carry (cout does not
//      depend on cin).
//   3. Two rows remain, the 4:2 sums and the 4:2 carries shifted left by one;
//      a carry-propagate adder gives the 2*WIDTH-bit product.
// No bit is dropped: every compressor keeps its input count exactly, so the
// two final rows add up to a*b, and nothing reaches columns 2*WIDTH and above.
//
// Interface: a, b are the unsigned operands, p = a * b. No clock, no reset:
// the product is valid one combinational delay after the operands.
//
// The use of 4:2 and 7:2 compressors built from XOR-XNOR cells and the
// crosswise column sums follow the published proposed multiplier. The
// two-stage column schedule and the final carry-propagate adder are this
// design's own choices, as the arrangement of the compressors is not given.
// WIDTH defaults to 8; a 7:2 compressor takes nine bits, so WIDTH may be
// 2 to 9.
module urdhwa_multiplier #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);
  localparam int unsigned NCOL  = 2 * WIDTH;  // product columns
  localparam int unsigned SLOTS = 9;          // inputs of one 7:2 compressor

  if (WIDTH < 2 || WIDTH > SLOTS) begin : g_bad_width
    $error("urdhwa_multiplier: WIDTH must lie in 2..9");
  end

  // ---------------------------------------------------------------------
  // Crosswise partial products: pp[k][i] = a[i] & b[k-i], or 0.
  // ---------------------------------------------------------------------
  logic [SLOTS-1:0] pp [NCOL];

  always_comb begin
    for (int k = 0; k < NCOL; k++) begin
      pp[k] = '0;
      for (int i = 0; i < WIDTH; i++) begin
        if (k - i >= 0 && k - i < WIDTH) pp[k][i] = a[i] & b[k-i];
      end
    end
  end

  // ---------------------------------------------------------------------
  // Step 1: one 7:2 compressor per column.
  // ---------------------------------------------------------------------
  logic [NCOL-1:0] s7;   // weight 2^k
  logic [NCOL-1:0] c7;   // weight 2^(k+1)
  logic [NCOL-1:0] d7a;  // weight 2^(k+2)
  logic [NCOL-1:0] d7b;  // weight 2^(k+2)

  for (genvar k = 0; k < NCOL; k++) begin : g_c72
    compressor_7_2 u_c72 (
      .x    (pp[k][6:0]),
      .cin1 (pp[k][7]),
      .cin2 (pp[k][8]),
      .sum  (s7[k]),
      .carry(c7[k]),
      .cout1(d7a[k]),
      .cout2(d7b[k])
    );
  end

  // ---------------------------------------------------------------------
  // Step 2: one 4:2 compressor per column, chained through cout -> cin.
  // ---------------------------------------------------------------------
  logic [NCOL-1:0] s4;   // weight 2^k
  logic [NCOL-1:0] c4;   // weight 2^(k+1)
  logic [NCOL:0]   co4;  // co4[k] is the cin of column k

  assign co4[0] = 1'b0;

  for (genvar k = 0; k < NCOL; k++) begin : g_c42
    logic x2, x3, x4;
    if (k >= 1) begin : g_x2
      assign x2 = c7[k-1];
    end else begin : g_x2_zero
      assign x2 = 1'b0;
    end
    if (k >= 2) begin : g_x34
      assign x3 = d7a[k-2];
      assign x4 = d7b[k-2];
    end else begin : g_x34_zero
      assign x3 = 1'b0;
      assign x4 = 1'b0;
    end
    compressor_4_2 u_c42 (
      .x1   (s7[k]),
      .x2   (x2),
      .x3   (x3),
      .x4   (x4),
      .cin  (co4[k]),
      .sum  (s4[k]),
      .carry(c4[k]),
      .cout (co4[k+1])
    );
  end

  // ---------------------------------------------------------------------
  // Step 3: carry-propagate addition of the two remaining rows. The bits
  // that would land in column NCOL (c4, co4 and the 7:2 outputs of the top
  // columns) are zero for every a, b, since a*b < 2**NCOL.
  // ---------------------------------------------------------------------
  assign p = s4 + {c4[NCOL-2:0], 1'b0};

  logic unused_top;
  assign unused_top = ^{c4[NCOL-1], co4[NCOL], c7[NCOL-1],
                        d7a[NCOL-1:NCOL-2], d7b[NCOL-1:NCOL-2]};
endmodule
