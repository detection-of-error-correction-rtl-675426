// sec_code_pkg
//
// Column construction for a single-error-correcting (SEC) code that protects
// a block of d data bits plus c control bits, arranged so the control bits
// can be corrected from only part of the syndrome.
//
// The p check bits are split into two groups:
//   * p_cd "shared" check bits, which cover both control and data bits
//     (syndrome bits 0 .. p_cd-1, also written s1..s_pcd);
//   * p_d "data-only" check bits, which cover only data bits
//     (syndrome bits p_cd .. p_cd+p_d-1).
// A control bit's parity-check column has its data-only part all zero and
// a shared part of weight >= 2 that no data column uses. A single error in a
// control bit is therefore recognised from the p_cd shared syndrome bits
// alone. Every other shared value (zero, the p_cd weight-one values and any
// weight >= 2 value left over) is combined with all p_d-bit values for data
// columns, leaving out combinations whose whole column weight is below 2
// (they would be zero or equal a check bit's own unit column).
// The capacity is (2^p_cd - c) * 2^p_d - (p_d + 1) - p_cd data bits.
//
// Design choices (not fixed by the method): the control values are the c
// smallest shared values of weight >= 2 (for p_cd = 3: 3'b011, 3'b101,
// 3'b110), and data columns are numbered in ascending order of
// (shared value, data-only value). Functions take sizes as arguments and
// return 32-bit columns so that they can be used in any module's
// elaboration.
package sec_code_pkg;

  localparam int unsigned MAX_P = 32;

  function automatic int unsigned popcount32(input logic [MAX_P-1:0] v);
    int unsigned n = 0;
    logic [MAX_P-1:0] x = v;
    while (x != '0) begin
      n += int'(x[0]);
      x = x >> 1;
    end
    return n;
  endfunction

  // Shared-group value used by control bit k (0-based).
  function automatic logic [MAX_P-1:0] ctrl_shared_value(input int unsigned k,
                                                         input int unsigned p_cd);
    int unsigned seen = 0;
    logic [MAX_P-1:0] r = '0;
    for (int unsigned v = 0; v < (32'd1 << p_cd); v++) begin
      if (popcount32(MAX_P'(v)) >= 2) begin
        if (seen == k) r = MAX_P'(v);
        seen++;
      end
    end
    return r;
  endfunction

  // True when shared value v belongs to one of the c control bits.
  function automatic bit is_ctrl_value(input int unsigned v, input int unsigned c,
                                       input int unsigned p_cd);
    bit hit = 1'b0;
    for (int unsigned k = 0; k < c; k++)
      if (ctrl_shared_value(k, p_cd) == MAX_P'(v)) hit = 1'b1;
    return hit;
  endfunction

  // Full parity-check column of control bit k: shared part only.
  function automatic logic [MAX_P-1:0] ctrl_col(input int unsigned k, input int unsigned p_cd);
    return ctrl_shared_value(k, p_cd);
  endfunction

  // Full parity-check column of data bit j.
  // Bits [p_cd-1:0] are the shared part, bits [p_cd+p_d-1:p_cd] the data-only part.
  function automatic logic [MAX_P-1:0] data_col(input int unsigned j, input int unsigned c,
                                                input int unsigned p_cd, input int unsigned p_d);
    int unsigned n = 0;
    int unsigned wv;
    int unsigned wu;
    for (int unsigned v = 0; v < (32'd1 << p_cd); v++) begin
      if (!is_ctrl_value(v, c, p_cd)) begin
        wv = popcount32(MAX_P'(v));
        for (int unsigned u = 0; u < (32'd1 << p_d); u++) begin
          wu = popcount32(MAX_P'(u));
          if (wv + wu >= 2) begin
            if (n == j) return MAX_P'((u << p_cd) | v);
            n++;
          end
        end
      end
    end
    return '0;
  endfunction

  // Number of data bits the construction can protect.
  function automatic int capacity(input int unsigned c, input int unsigned p_cd,
                                  input int unsigned p_d);
    return ((1 << p_cd) - int'(c)) * (1 << p_d) - (int'(p_d) + 1) - int'(p_cd);
  endfunction

  // Number of control values available (shared values of weight >= 2).
  function automatic int ctrl_slots(input int unsigned p_cd);
    return (1 << p_cd) - int'(p_cd) - 1;
  endfunction

  // Smallest p_cd that protects d data bits and c control bits with p check bits in all.
  function automatic int unsigned min_p_cd(input int unsigned d, input int unsigned c,
                                           input int unsigned p);
    int unsigned r = 0;
    for (int unsigned q = p; q >= 2; q--)
      if (ctrl_slots(q) >= int'(c) && capacity(c, q, p - q) >= int'(d)) r = q;
    return r;
  endfunction

endpackage
