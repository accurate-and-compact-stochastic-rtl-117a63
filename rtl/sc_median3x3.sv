// sc_median3x3: correlated SC 3x3 median filter.
//
// For fully correlated SNs the AND of two streams is exactly the stream of the
// smaller value and the OR exactly that of the larger one, so a compare-exchange
// unit is one AND and one OR gate. The median of the nine window pixels is found
// by a sorting network of such units. The document only says that the network is
// made of AND and OR gates; the network used here is the well-known 19-exchange
// median-of-9 network (only the exchanges the median depends on). Both gates
// preserve correlation, so the output is fully correlated with the inputs, and
// with exact inputs the output stream holds exactly the median number of ones.
//
// Interface: p[k] is pixel (row k/3, column k%3) of the window, row 0 on top;
// med is combinational.
module sc_median3x3 (
  input  logic [8:0] p,
  output logic       med
);
  localparam int unsigned NEX = 19;
  // Compare-exchange list: after exchange (a, b), v[a] = min, v[b] = max.
  localparam int unsigned EX_A [NEX] = '{1, 4, 7, 0, 3, 6, 1, 4, 7, 0, 5, 4, 3, 1, 2, 4, 4, 6, 4};
  localparam int unsigned EX_B [NEX] = '{2, 5, 8, 1, 4, 7, 2, 5, 8, 3, 8, 7, 6, 4, 5, 7, 2, 4, 2};

  logic [8:0] v;
  logic       lo, hi;

  always_comb begin
    v = p;
    for (int unsigned k = 0; k < NEX; k++) begin
      lo = v[EX_A[k]] & v[EX_B[k]];
      hi = v[EX_A[k]] | v[EX_B[k]];
      v[EX_A[k]] = lo;
      v[EX_B[k]] = hi;
    end
    med = v[4];
  end
endmodule
