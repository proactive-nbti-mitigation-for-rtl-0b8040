// circ_find_k: finds the first K set bits of an N-bit vector in circular
// order, starting at index `start` and wrapping past N-1 to 0.
//
// Used by the round-robin allocator (to pick ready entries) and by the
// wake-up logic (to pick inactive entries). Purely combinational: a linear
// scan of the N positions with a running count, which synthesizes to a
// chain of small incrementers. Outputs: the number found (at most K), the
// index of each find in scan order (idx[j] valid for j < count).
module circ_find_k #(
  parameter int unsigned N  = 128,
  parameter int unsigned K  = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic [N-1:0]  vec,
  input  logic [IW-1:0] start,
  output logic [CW-1:0] count,
  output logic [IW-1:0] idx [K]
);

  always_comb begin
    int unsigned pos;
    int unsigned found;
    found = 0;
    for (int unsigned j = 0; j < K; j++) idx[j] = '0;
    for (int unsigned j = 0; j < N; j++) begin
      pos = int'(start) + j;
      if (pos >= N) pos = pos - N;
      if (vec[pos] && found < K) begin
        idx[found] = IW'(pos);
        found      = found + 1;
      end
    end
    count = CW'(found);
  end

endmodule
