// addr_gen: address, switching-pattern and group-select generator.
//
// Everything the controller needs in one cycle follows from the per-symbol
// cycle counter c = (c_{m-q-1} ... c_0), with m = log2 N chosen at run time,
// q = log2 P, alpha = m - 2q - 1 and beta = floor(alpha/2):
//
//   J   = BR(c_{m-q-1} ... c_{m-2q})          switching pattern, changes every
//                                             N/P^2 cycles (the q top bits)
//   grp = c_beta                (alpha even)  0 = group A, 1 = group B
//         c_beta xor c_beta+1   (alpha odd)
//   odd symbol  : every bank uses the counter with bit c_beta deleted,
//                 i.e. (c_top << alpha) | drop(c_low, beta)
//   even symbol : data go to the places their bit-reversed counterparts of
//                 the previous symbol occupied. The address for path p is
//                 BR_q(p) * 2^alpha + drop(BR(c_low), beta), where c_low are the
//                 m-2q low counter bits; the per-path addresses are then
//                 rotated to the banks by a write commutator with pattern J.
//
// The group-select rule and both address formulas are those of the reference
// architecture; written this way they reproduce its 128-point example bank by
// bank and address by address. Where the reference picks the counter fields
// for each FFT length with a multiplexer per length, this version uses
// shifts by m; the result is the same for every supported length.
// The same generator serves the read side: reading a symbol uses the formula
// of the following symbol's parity at the read counter, because the next
// symbol is written into exactly the places released by the read.
//
// Interface: m_i (log2 N), cnt_i (counter), even_i (1 = even-symbol formula)
// in; addr_o[P], j_o, grp_o out. Timing: purely combinational.
module addr_gen
  import bitrev_pkg::*;
#(
  parameter int unsigned P    = 8,
  parameter int unsigned MMAX = 15,
  localparam int unsigned Q   = $clog2(P),
  localparam int unsigned CW  = MMAX - Q,      // counter width, N/P cycles
  localparam int unsigned AW  = MMAX - Q - 1,  // bank address width, N/(2P) words
  localparam int unsigned MW  = $clog2(MMAX + 1)
) (
  input  logic [MW-1:0] m_i,
  input  logic [CW-1:0] cnt_i,
  input  logic          even_i,
  output logic [AW-1:0] addr_o [P],
  output logic [Q-1:0]  j_o,
  output logic          grp_o
);
  int unsigned m, alpha, beta, lw;
  word_t c, c_top, c_low, even_low;
  logic [AW-1:0] odd_addr;
  logic [AW-1:0] path_addr [P];
  logic [AW-1:0] bank_addr [P];

  always_comb begin
    m     = int'(m_i);
    alpha = m - 2*Q - 1;
    beta  = alpha >> 1;
    lw    = m - 2*Q;                       // width of the low counter field
    c     = word_t'(cnt_i);
    c_top = c >> lw;
    c_low = c & ((word_t'(1) << lw) - word_t'(1));

    j_o   = Q'(rev_bits(c_top, Q));
    if (alpha[0]) grp_o = c[beta] ^ c[beta+1];
    else          grp_o = c[beta];

    odd_addr = AW'((c_top << alpha) | drop_bit(c_low, beta));
    even_low = drop_bit(rev_bits(c_low, lw), beta);
    for (int p = 0; p < P; p++)
      path_addr[p] = AW'((rev_bits(word_t'(p), Q) << alpha) | even_low);
  end

  cmt_wr #(.P(P), .W(AW)) u_addr_cmt (
    .path_i(path_addr),
    .j_i   (j_o),
    .bank_o(bank_addr)
  );

  always_comb begin
    for (int b = 0; b < P; b++) addr_o[b] = even_i ? bank_addr[b] : odd_addr;
  end

  initial begin
    assert (MMAX >= 2*Q + 1) else $error("addr_gen: MMAX must be at least 2*log2(P)+1");
  end
endmodule
