// nikhilam_mult: NxN-bit unsigned multiplier after the Nikhilam sutra
// ("all from nine and last from ten"): multiply two numbers through their
// distances from a common base instead of multiplying them directly.
// With base R = 2^k chosen near x:
//   residue1 = x - R              (radix selection unit)
//   residue2 = y - R              (subtractor)
//   x * y    = (x + residue2) * R + residue1 * residue2
// so the wide product becomes a shift of the "common difference" x + y - R
// plus the product of two residues, which are small when x and y lie near R.
// Datapath, all combinational:
//   rsu       -> exponent k, radix R, residue1
//   addsub    -> residue2 = y - R
//   addsub    -> t = x + residue2
//   shifter   -> t << k
//   vedic_mult-> |residue1| * |residue2|  (NxN Vedic multiplier)
//   addsub    -> p = (t << k) +/- residue product (sign of residue1 ^ residue2)
// The blocks and their connections follow the source's generalised Nikhilam
// architecture (RSU, subtractor, adder/subtractor, shifter, multiplier,
// adder/subtractor). Using the unsigned Vedic multiplier on residue
// magnitudes (two extra negators and a sign XOR), the binary base rule of
// rsu and the default width N = 16 are this design's choices. N must be a
// power of two, at least 4.
module nikhilam_mult #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]          x,
  input  logic [N-1:0]          y,
  output logic [2*N-1:0]        p,
  output logic [$clog2(N)-1:0]  exponent
);
  localparam int unsigned KW = $clog2(N);

  logic [N-1:0] radix;
  logic [N:0]   res1, res2;
  logic         c_r2;
  rsu #(.N(N), .KW(KW)) u_rsu (.x(x), .exponent(exponent), .radix(radix), .residue(res1));

  addsub #(.W(N+1)) u_sub_r2 (
    .a({1'b0, y}), .b({1'b0, radix}), .sub(1'b1), .y(res2), .cout(c_r2)
  );

  // Common difference t = x + residue2 (signed, N+2 bits), then t * R.
  logic [N+1:0]   t;
  logic           c_t;
  logic [2*N+1:0] t_shift;
  addsub #(.W(N+2)) u_add_t (
    .a({2'b00, x}), .b({res2[N], res2}), .sub(1'b0), .y(t), .cout(c_t)
  );
  shifter #(.W(2*N+2), .SW(KW)) u_shift (
    .d({{N{t[N+1]}}, t}), .sh(exponent), .y(t_shift)
  );

  // Residue product on magnitudes: |residue1| < 2^(N-1), |residue2| < 2^N.
  logic [N:0]     mag1, mag2;
  logic           c_m1, c_m2;
  logic [2*N-1:0] rprod;
  logic           neg;
  addsub #(.W(N+1)) u_abs1 (.a('0), .b(res1), .sub(res1[N]), .y(mag1), .cout(c_m1));
  addsub #(.W(N+1)) u_abs2 (.a('0), .b(res2), .sub(res2[N]), .y(mag2), .cout(c_m2));
  vedic_mult #(.N(N)) u_rmul (.a(mag1[N-1:0]), .b(mag2[N-1:0]), .c(rprod));
  assign neg = res1[N] ^ res2[N];

  // p = t * R + residue1 * residue2; the true product fits in 2N bits.
  logic [2*N+1:0] full;
  logic           c_f;
  addsub #(.W(2*N+2)) u_final (
    .a(t_shift), .b({2'b00, rprod}), .sub(neg), .y(full), .cout(c_f)
  );
  assign p = full[2*N-1:0];
endmodule
