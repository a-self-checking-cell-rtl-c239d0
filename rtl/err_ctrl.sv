// Error controller: two-rail parity checker over the cell's check pairs.
//
// Every checked unit (the multiplexers and the current sensor) delivers a
// pair e1,e2 that is 00 or 11 when it is fault-free and 01 or 10 when it has
// found a fault. One XOR tree sums all e1 bits modulo 2, a second sums all e2
// bits. With no faulty pair the two sums are equal (z = 00 or 11); a single
// faulty pair makes them differ (z = 01 or 10). Keeping the two rails apart
// instead of merging them into one error bit keeps the checker totally
// self-checking: a fault in one tree also shows as 01 or 10.
//
// Each tree is a balanced tree of two-input XORs, N_IN-1 gates per tree
// (6 for the 7 pairs of the cell). Combinational.
module err_ctrl #(
  parameter int unsigned N_IN = 7
) (
  input  logic [N_IN-1:0] e1,
  input  logic [N_IN-1:0] e2,
  output logic [1:0]      z    // z[1] = XOR of e1, z[0] = XOR of e2
);

  // Heap-ordered tree: leaves at N_IN .. 2*N_IN-1, node i = node 2i ^ node 2i+1.
  logic [2*N_IN-1:0] t1, t2;

  always_comb begin
    t1 = '0;
    t2 = '0;
    for (int unsigned i = 0; i < N_IN; i++) begin
      t1[N_IN+i] = e1[i];
      t2[N_IN+i] = e2[i];
    end
    for (int unsigned i = N_IN - 1; i >= 1; i--) begin
      t1[i] = t1[2*i] ^ t1[2*i+1];
      t2[i] = t2[2*i] ^ t2[2*i+1];
    end
    z = {t1[1], t2[1]};
  end

endmodule
