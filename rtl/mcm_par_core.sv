// mcm_par_core: MCM-parallel block, one sample in, NOUT constant products out
// together.
//
// Every output p[i] = s * COEF[i] is made of shifts and adders only, and the
// products share hardware the way a multiple-constant-multiplication (MCM)
// block does:
//  * each coefficient is split into odd part and power of two (296 = 37 << 3);
//    outputs whose coefficients have the same odd magnitude share one
//    "fundamental" s * odd, reached through a wired shift and, for a negative
//    coefficient, a negation;
//  * each new fundamental is first sought as a single addition or
//    subtraction of two already available terms (the sample itself or an
//    earlier fundamental, one of them shifted), e.g. 37 = 21 + 16 once 21 is
//    built, or 219 = 256 - 37; only if no such one-adder form exists is it
//    built on its own as a canonical-signed-digit shift-add chain (const_mult).
// Fundamentals are built in output order, so the order of COEF matters a
// little. This greedy sharing is this design's own, simple stand-in for an
// optimising MCM generator.
//
// With NOUT = 4 and one matrix column as COEF this is the 1-input 4-output
// block of a single transform (one per input sample in a one-transform 1-D
// circuit, five per input sample in MCM_PAR). With NOUT = 5 and the five
// matrices' coefficients of one position it is the parallel half of an
// MCM_MIX0 block. Purely combinational.
module mcm_par_core
  import amt_pkg::*;
#(
  parameter int unsigned          NOUT = 4,
  parameter coef_t [NOUT-1:0]     COEF = col_coefs(int'(TR_DCT8), 0)
) (
  input  data_t             s,
  output prod_t [NOUT-1:0]  p
);

  // Index of the first output with the same odd magnitude as output i.
  function automatic int owner_of(int i);
    int o;
    o = i;
    for (int q = i - 1; q >= 0; q--)
      if (odd_part(int'(COEF[q])) == odd_part(int'(COEF[i]))) o = q;
    return o;
  endfunction

  // 1 when output i builds its own fundamental (first of its odd magnitude).
  function automatic bit is_owner(int i);
    return (int'(COEF[i]) != 0) && (owner_of(i) == i);
  endfunction

  // Value of source g: -1 is the sample itself (1), otherwise the
  // fundamental of output g.
  function automatic int src_val(int g);
    return (g < 0) ? 1 : odd_part(int'(COEF[g]));
  endfunction

  // Search for fundamental i as one adder over two earlier sources:
  //   op 1: (g << a) + h,  op 2: (g << a) - h,  op 3: h - (g << a).
  // Returns 0 if there is none, otherwise an encoded (g, a, h, op).
  function automatic int find_pair(int i);
    int f, vg, vh;
    f = odd_part(int'(COEF[i]));
    if (csd_weight(f) <= 2) return 0;  // a CSD chain needs one adder too
    for (int g = -1; g < i; g++) begin
      if (g >= 0 && !is_owner(g)) continue;
      for (int h = -1; h < i; h++) begin
        if (h >= 0 && !is_owner(h)) continue;
        vg = src_val(g);
        vh = src_val(h);
        for (int a = 1; a < 11; a++) begin
          if ((vg << a) + vh == f) return ((((g + 1) * 16 + a) * 16 + (h + 1)) * 4 + 1);
          if ((vg << a) - vh == f) return ((((g + 1) * 16 + a) * 16 + (h + 1)) * 4 + 2);
          if (vh - (vg << a) == f) return ((((g + 1) * 16 + a) * 16 + (h + 1)) * 4 + 3);
        end
      end
    end
    return 0;
  endfunction

  prod_t s_ext;
  assign s_ext = prod_t'(s);

  prod_t fund [NOUT];  // s * odd_part(COEF[i]), shared between outputs

  for (genvar i = 0; i < NOUT; i++) begin : g_out
    localparam int CI  = int'(COEF[i]);
    localparam int OWN = owner_of(i);
    localparam int SH  = pow2_part(CI);
    localparam int PR  = find_pair(i);

    if (CI == 0) begin : g_zero
      assign fund[i] = '0;
      assign p[i]    = '0;
    end else begin : g_nz
      if (OWN == i && PR != 0) begin : g_pair
        localparam int OP = PR % 4;
        localparam int H  = (PR / 4) % 16 - 1;
        localparam int A  = (PR / 64) % 16;
        localparam int G  = PR / 1024 - 1;
        prod_t src_g, src_h;
        if (G < 0) begin : g_gs
          assign src_g = s_ext;
        end else begin : g_gf
          assign src_g = fund[G];
        end
        if (H < 0) begin : g_hs
          assign src_h = s_ext;
        end else begin : g_hf
          assign src_h = fund[H];
        end
        if (OP == 1) begin : g_add
          assign fund[i] = (src_g <<< A) + src_h;
        end else if (OP == 2) begin : g_sub
          assign fund[i] = (src_g <<< A) - src_h;
        end else begin : g_rsub
          assign fund[i] = src_h - (src_g <<< A);
        end
      end else if (OWN == i) begin : g_fund
        const_mult #(.C(odd_part(CI))) u_mult (.s(s), .p(fund[i]));
      end else begin : g_share
        assign fund[i] = fund[OWN];
      end
      if (CI < 0) begin : g_neg
        assign p[i] = -(fund[OWN] <<< SH);
      end else begin : g_pos
        assign p[i] = fund[OWN] <<< SH;
      end
    end
  end

endmodule
