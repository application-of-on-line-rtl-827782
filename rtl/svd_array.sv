// svd_array: systolic array for the singular value decomposition of an
// N x N matrix (Brent, Luk and van Loan), built from on-line arithmetic.
//
// The array has N/2 x N/2 processors; processor (p,q) holds the 2x2 block of
// rows 2p,2p+1 and columns 2q,2q+1 of the matrix being diagonalized.  In an
// iteration every diagonal processor computes a left and a right rotation
// that diagonalize its block; the left angle travels along its processor row
// and the right angle along its processor column, one processor per cycle,
// and every processor applies the two-sided rotation to its block as the
// angle digits arrive.  The rotated elements then move to the neighbouring
// processors so that rows and columns meet in the parallel ordering; with
// K = N/2 and pair slots L (first) and R (second) of processor k:
//     L0 stays, R0 -> L1, Lk -> Lk+1 (1 <= k <= K-2), L(K-1) -> R(K-1),
//     Rk -> Rk-1 (k >= 1)
// applied to both the row and the column position of every element.  After
// N-1 iterations (a sweep) every pair of rows and of columns has met once.
// S sweeps are made; the blocks rotated in the last iteration leave on
// `res` instead of moving on.  The diagonal of the result holds the singular
// values (with signs).
//
// Everything flows as on-line operands: exponent and one signed digit per
// cycle.  There is no central control: each unit starts when its operands
// arrive, and the next iteration of a diagonal processor starts as soon as
// its new block is in (about 107 cycles after the previous one).
// Interface: `ld` loads the matrix, one operand per element, every operand
// of a processor with its first digit in the same cycle or held in its
// buffers; `res` carries the result blocks, res[p][q][r][c] being element
// (2p+r, 2q+c) of the final rotated matrix before its last exchange.
// From the document: the array, the processor types, the angle flow with
// one cycle per processor, the exchange after each iteration and a fixed
// number of sweeps.  The exact exchange pattern is the standard parallel
// ordering written out here; the interface and the per-output iteration
// counting are this design's own.
module svd_array
  import ol_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned S     = 10,
  parameter int unsigned M     = OL_M,
  parameter int unsigned DEPTH = 128,
  parameter int unsigned EPS_K = 50,
  localparam int unsigned K    = N / 2
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  ld  [K][K][2][2],
  output ol_t  res [K][K][2][2],
  output logic [K-1:0][1:0] eps_hit
);

  localparam int unsigned ITERS = S * (N - 1);
  localparam int unsigned IW    = $clog2(ITERS + 1);

  // source slot (2*k + side) of destination slot (k', side')
  function automatic int src_slot(input int kd, input int sd);
    if (sd == 0) begin
      if (kd == 0)      return 0;
      else if (kd == 1) return 1;               // R0 -> L1
      else              return 2 * (kd - 1);    // Lk -> Lk+1
    end else begin
      if (kd == int'(K) - 1) return 2 * (int'(K) - 1);  // L(K-1) -> R(K-1)
      else                   return 2 * (kd + 1) + 1;   // Rk -> Rk-1
    end
  endfunction

  ol_t ein  [K][K][2][2];   // element inputs of the processors
  ol_t eout [K][K][2][2];   // rotated elements
  ol_t nb   [K][K][2][2];   // rotated elements on their way to a neighbour
  ol_t acl [K][K], asl [K][K], acr [K][K], asr [K][K];   // angles leaving (p,q)

  for (genvar p = 0; p < K; p++) begin : g_row
    for (genvar q = 0; q < K; q++) begin : g_col
      // angle inputs: from the neighbour nearer the diagonal
      localparam int QN = (q > p) ? q - 1 : q + 1;
      localparam int PN = (p > q) ? p - 1 : p + 1;

      if (p == q) begin : g_diag
        diag_proc #(.M(M), .DEPTH(DEPTH), .EPS_K(EPS_K)) u_p (
          .clk, .rst_n,
          .a11(ein[p][q][0][0]), .a12(ein[p][q][0][1]),
          .a21(ein[p][q][1][0]), .a22(ein[p][q][1][1]),
          .b11(eout[p][q][0][0]), .b12(eout[p][q][0][1]),
          .b21(eout[p][q][1][0]), .b22(eout[p][q][1][1]),
          .cl(acl[p][q]), .sl(asl[p][q]), .cr(acr[p][q]), .sr(asr[p][q]),
          .eps_hit(eps_hit[p]));
      end else begin : g_off
        offdiag_proc #(.M(M), .DEPTH(DEPTH)) u_p (
          .clk, .rst_n,
          .a11(ein[p][q][0][0]), .a12(ein[p][q][0][1]),
          .a21(ein[p][q][1][0]), .a22(ein[p][q][1][1]),
          .cl_in(acl[p][QN]), .sl_in(asl[p][QN]),
          .cr_in(acr[PN][q]), .sr_in(asr[PN][q]),
          .b11(eout[p][q][0][0]), .b12(eout[p][q][0][1]),
          .b21(eout[p][q][1][0]), .b22(eout[p][q][1][1]),
          .cl_out(acl[p][q]), .sl_out(asl[p][q]),
          .cr_out(acr[p][q]), .sr_out(asr[p][q]));
      end

      for (genvar r = 0; r < 2; r++) begin : g_r
        for (genvar c = 0; c < 2; c++) begin : g_c
          // iteration count of this output, by its digits
          logic [$clog2(M)-1:0] dcnt;
          logic [IW-1:0]        icnt;
          logic                 last;
          always_ff @(posedge clk or negedge rst_n) begin
            if (!rst_n) begin
              dcnt <= '0;
              icnt <= '0;
            end else if (eout[p][q][r][c].v) begin
              if (dcnt == ($clog2(M))'(M - 1)) begin
                dcnt <= '0;
                icnt <= icnt + 1'b1;
              end else begin
                dcnt <= dcnt + 1'b1;
              end
            end
          end
          assign last = (icnt == IW'(ITERS - 1));
          assign nb[p][q][r][c]  = last ? OL_IDLE : eout[p][q][r][c];
          assign res[p][q][r][c] = last ? eout[p][q][r][c] : OL_IDLE;

          // parallel-ordering exchange: where this slot's next element comes from
          localparam int SR = src_slot(p, r);
          localparam int SC = src_slot(q, c);
          assign ein[p][q][r][c] = ld[p][q][r][c].v ? ld[p][q][r][c]
                                                    : nb[SR/2][SC/2][SR%2][SC%2];
        end
      end
    end
  end

endmodule
