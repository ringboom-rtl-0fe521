// mispredict_sel: picks the oldest of several branch mispredicts resolved in
// the same cycle, with flat one-hot logic.
//
// Every requester carries its ROB index. Age is the distance from the ROB
// head (in-flight entries lie between head and tail, so the entry nearest the
// head is the oldest; this also holds when the ROB is full). All pairwise "older than"
// comparisons are made in parallel and requester i wins when it is older than
// every other valid requester, which gives a one-hot grant in one comparator
// level plus an AND tree, instead of a chain of comparisons whose depth grows
// with the number of columns. ROB indices of valid requesters are distinct.
// Combinational.
//
// Follows the design: the oldest of many mispredicts is selected with
// low-depth one-hot logic. Own choices: the age measure and the interface.
module mispredict_sel
  import rb_pkg::*;
#(
  parameter int N = NCOL          // requesters (one per column ALU)
) (
  input  logic    [N-1:0] v,
  input  robidx_t [N-1:0] rob,
  input  robidx_t         head,   // ROB head (oldest in-flight entry)
  output logic    [N-1:0] sel,    // one-hot: the oldest valid requester
  output logic            out_v,
  output robidx_t         out_rob
);

  robidx_t [N-1:0] age;           // rob - head: smaller is older
  logic [N-1:0][N-1:0] older;     // older[i][j]: i is older than j

  always_comb begin
    for (int i = 0; i < N; i++) age[i] = rob[i] - head;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        older[i][j] = (i == j) || !v[j] || age[i] < age[j];
    for (int i = 0; i < N; i++) sel[i] = v[i] && &older[i];
    out_v = |v;
    out_rob = '0;
    for (int i = 0; i < N; i++) out_rob |= sel[i] ? rob[i] : '0;
  end

endmodule
