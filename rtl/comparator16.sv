// comparator16 -- 16-bit magnitude comparator built from 4-bit comparators.
//
// The operands are cut into WIDTH/SLICE slices of SLICE bits. Each slice is
// compared by a proposed_comparator, giving a (g, s) pair that is 1,0 / 0,1 /
// 0,0 for greater / smaller / equal. Those pairs are never both 1, exactly like
// the flags of the first stage, so one more simplified_compare_logic, one bit
// per slice, picks the most significant slice that is not equal and passes
// on its verdict. eq is 1 when neither g nor s is.
//
// Interface: a, b (WIDTH bits, unsigned) in; g = (a > b), s = (a < b),
// eq = (a == b) out. Timing: purely combinational; the path is the slice
// comparator plus one more compare stage.
//
// Building the wide comparator from 4-bit ones follows the published design.
// How the slice results are merged, and the eq output, are this
// implementation's choices: the slices are merged with the design's own
// compare logic, and eq is the NOR of g and s.
module comparator16 #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned SLICE = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             g,
  output logic             s,
  output logic             eq
);

  localparam int unsigned NSLICE = WIDTH / SLICE;

  if (SLICE == 0 || WIDTH % SLICE != 0) begin : g_bad_width
    $error("comparator16: WIDTH must be a non-zero multiple of SLICE");
  end

  logic [NSLICE-1:0] slice_g;
  logic [NSLICE-1:0] slice_s;

  for (genvar k = 0; k < NSLICE; k++) begin : g_slice
    proposed_comparator #(.WIDTH(SLICE)) u_cmp (
      .a (a[k*SLICE +: SLICE]),
      .b (b[k*SLICE +: SLICE]),
      .g (slice_g[k]),
      .s (slice_s[k])
    );
  end

  simplified_compare_logic #(.WIDTH(NSLICE)) u_merge (
    .a_sig (slice_g),
    .b_sig (slice_s),
    .g     (g),
    .s     (s)
  );

  assign eq = ~(g | s);

endmodule
