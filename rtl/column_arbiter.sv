// column_arbiter: picks the execution column of every micro-op of a rename
// bundle (RingScalar column steering).
//
// For lane i the request follows the column request table of the design:
//   prs1 busy            -> column after the producer of prs1  (col1 + 1)
//   prs1 ready, prs2 busy-> column after the producer of prs2  (col2 + 1)
//   neither busy         -> a pseudo-random column
// "+1" is a rotation of the one-hot column vector. When an operand is produced
// by an older lane of the same bundle (byp1/byp2 select that lane, one-hot),
// the producer column is that lane's own request, so each lane sees the columns
// requested by the older ones (intra-bundle bypass chain, as in the arbiter
// figure). The random input is rotated one step per lane, as the figure's
// chain of "+1" boxes on the random line shows.
//
// Purely combinational. busy1/busy2 must already be false for operands that
// only wait on a load (those wake in every column) and true for an operand
// produced by an older lane that is not a load; the caller decides that.
//
// Follows the design: the three rows of the column request table and the
// intra-bundle bypass of producer columns. Own choice: how the random column is
// produced and spread over the lanes.
module column_arbiter
  import rb_pkg::*;
#(
  parameter int LANES = NCOL
) (
  input  colmask_t             rnd,              // one-hot random column
  input  logic     [LANES-1:0] busy1,            // prs1 waiting (non-load)
  input  logic     [LANES-1:0] busy2,            // prs2 waiting (non-load)
  input  colmask_t [LANES-1:0] col1,             // producer column of prs1 from the tables
  input  colmask_t [LANES-1:0] col2,             // producer column of prs2 from the tables
  input  logic     [LANES-1:0][LANES-1:0] byp1,  // prs1 produced by older lane j (one-hot, j < i)
  input  logic     [LANES-1:0][LANES-1:0] byp2,
  output colmask_t [LANES-1:0] req               // one-hot column of each lane
);

  colmask_t [LANES-1:0] c1, c2, rnd_l;

  always_comb begin
    colmask_t r;
    colmask_t [LANES-1:0] q;
    q = '0;
    r = rnd;
    for (int i = 0; i < LANES; i++) begin
      rnd_l[i] = r;
      r = rot1(r);
      // operand producer columns, bypassed from older lanes
      c1[i] = col1[i];
      c2[i] = col2[i];
      for (int j = 0; j < i; j++) begin
        if (byp1[i][j]) c1[i] = q[j];
        if (byp2[i][j]) c2[i] = q[j];
      end
      if (busy1[i])      q[i] = rot1(c1[i]);
      else if (busy2[i]) q[i] = rot1(c2[i]);
      else               q[i] = rot1(rnd_l[i]);
    end
    req = q;
  end

endmodule
