// dom_chi_row: one masked 5-bit chi S-box with d+1 input and (d+1)^2 output
// shares, ready to be composed with a linear layer without a register.
//
// Inputs are the S = D+1 shares of the row <a,b,c,d,e> (bit 0 = a). Output
// share k = i*S + j is built only from a[(i+j) mod S], b[i], c[j], d[i] and
// e[j]: every output share sees at most one share of each input, so any
// linear function placed on one output share (theta of the next round)
// still combines no two shares of one input. With the choice of which
// share carries the complement and the linear term, all five output bits
// follow one pattern (i,j,alpha = (i+j) mod S):
//   a'_k = (~b_i if i==0 else b_i) & c_j   ^ (a_alpha if j==0) ^ r0{i,j}
//   b'_k = (~c_j if j==0 else c_j) & d_i   ^ (b_i if j==0)     ^ r1{i,j}
//   c'_k = (~d_i if i==0 else d_i) & e_j   ^ (c_j if i==0)     ^ r2{i,j}
//   d'_k = (~e_j if j==0 else e_j) & a_alpha ^ (d_i if j==0)   ^ r3{alpha,j}
//   e'_k = (~a_alpha if alpha==0 else a_alpha) & b_i ^ (e_j if i==0) ^ r4{alpha,i}
// where rm{p,q} = rm{q,p} is a fresh mask bit for p != q and 0 for p == q
// (inner-domain terms are not refreshed). Each mask therefore appears in
// exactly two output shares and cancels in their sum. This placement of
// terms and masks is the one of the generic construction this design
// follows; writing it as one pattern is this implementation's own.
//
// Mask bit m of pair (p<q) is r[m*NP + pidx(p,q)], NP = S(S-1)/2, with
// pairs numbered row by row: (0,1),(0,2)..(0,S-1),(1,2),...
// Combinational; the masks must be fresh in every cycle.
module dom_chi_row
  import keccak_pkg::*;
#(
  parameter int unsigned D = 1
) (
  input  logic [D:0][4:0]                 x,
  input  logic [row_masks(D+1)-1:0]       r,
  output logic [(D+1)*(D+1)-1:0][4:0]     y
);

  localparam int unsigned S  = D + 1;
  localparam int unsigned NP = S * (S - 1) / 2;

  function automatic int unsigned pidx(int unsigned p, int unsigned q);
    int unsigned lo, hi;
    lo = (p < q) ? p : q;
    hi = (p < q) ? q : p;
    return lo * S - lo * (lo + 1) / 2 + (hi - lo - 1);
  endfunction

  // fresh mask m shared by domains p and q; none inside one domain
  function automatic logic mask(logic [row_masks(D+1)-1:0] rr, int unsigned m,
                                int unsigned p, int unsigned q);
    if (p == q) return 1'b0;
    return rr[m * NP + pidx(p, q)];
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < S; i++) begin
      for (int unsigned j = 0; j < S; j++) begin
        int unsigned al, k;
        logic ai, bi, ci, di, ei;
        al = (i + j) % S;
        k  = i * S + j;
        ai = x[al][0];
        bi = x[i][1];
        ci = x[j][2];
        di = x[i][3];
        ei = x[j][4];
        y[k][0] = ((i == 0) ? ~bi : bi) & ci ^ ((j == 0) ? ai : 1'b0) ^ mask(r, 0, i, j);
        y[k][1] = ((j == 0) ? ~ci : ci) & di ^ ((j == 0) ? bi : 1'b0) ^ mask(r, 1, i, j);
        y[k][2] = ((i == 0) ? ~di : di) & ei ^ ((i == 0) ? ci : 1'b0) ^ mask(r, 2, i, j);
        y[k][3] = ((j == 0) ? ~ei : ei) & ai ^ ((j == 0) ? di : 1'b0) ^ mask(r, 3, al, j);
        y[k][4] = ((al == 0) ? ~ai : ai) & bi ^ ((i == 0) ? ei : 1'b0) ^ mask(r, 4, al, i);
      end
    end
  end

endmodule
