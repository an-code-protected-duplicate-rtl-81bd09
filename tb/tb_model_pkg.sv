// tb_model_pkg - reference models for the testbenches.
//
// Bit-level models of fault injection, of one AN-coded ALU unit and of the
// whole duplicate system, written with integer arithmetic (multiply, divide,
// modulo, masks) rather than the structures the RTL uses, so that the
// testbenches compare the RTL against an independent computation.
package tb_model_pkg;
  import an_pkg::*;

  // Fault applied to the low w bits of d (en low: no fault).
  function automatic longint unsigned fm_apply(bit en, fault_t f, int w,
                                              longint unsigned d);
    longint unsigned r = d;
    int ia = int'(f.bit_a);
    int ib = int'(f.bit_b);
    bit va = (ia < w) ? d[ia] : 1'b0;
    bit vb = (ib < w) ? d[ib] : 1'b0;
    if (!en) return d;
    if (ia < w) begin
      case (f.kind)
        FK_SA0:        r[ia] = 1'b0;
        FK_SA1:        r[ia] = 1'b1;
        FK_INVERT:     r[ia] = !va;
        FK_BRIDGE_AND: r[ia] = va && vb;
        FK_BRIDGE_OR:  r[ia] = va || vb;
        FK_SWAP:       r[ia] = vb;
        default: ;
      endcase
    end
    if (ib < w && ib != ia) begin
      case (f.kind)
        FK_BRIDGE_AND: r[ib] = va && vb;
        FK_BRIDGE_OR:  r[ib] = va || vb;
        FK_SWAP:       r[ib] = va;
        default: ;
      endcase
    end
    return r;
  endfunction

  // One ALU unit: operands a, b (w bits each) -> quotient and error flag.
  function automatic void fm_alu(int w, longint unsigned a, longint unsigned b,
                                 alu_site_e site, fault_t f,
                                 output longint unsigned quot, output bit err);
    longint unsigned ca, cb, s, q, r;
    longint unsigned cmask = (64'd1 << (w + 2)) - 1;
    longint unsigned smask = (64'd1 << (w + 3)) - 1;
    ca = fm_apply(site == AS_CODE_A, f, w + 2, (a * 3) & cmask);
    cb = fm_apply(site == AS_CODE_B, f, w + 2, (b * 3) & cmask);
    s  = fm_apply(site == AS_SUM, f, w + 3, (ca + cb) & smask);
    q  = fm_apply(site == AS_QUOT, f, w + 2, s / 3);
    r  = fm_apply(site == AS_REM, f, 2, s % 3);
    quot = q;
    err  = (r != 0);
  endfunction

  typedef struct {
    longint unsigned quot;
    longint unsigned gold;
    bit e0, e1, sel1, err_det, corrupt;
  } sys_result_t;

  // Site inside ALU unit u named by a system site (AS_OFF if none).
  function automatic alu_site_e fm_unit_site(int u, fault_site_e site);
    int base = (u == 0) ? int'(FS_ALU0_CODE_A) : int'(FS_ALU1_CODE_A);
    int k = int'(site) - base;
    if (k >= 0 && k < 5) return alu_site_e'(k + 1);
    return AS_OFF;
  endfunction

  // Whole system for one operand pair, with up to two faults (slot 0 wins
  // where both slots name the same bus or unit).
  function automatic sys_result_t fm_system(int w, longint unsigned a,
                                            longint unsigned b,
                                            fault_site_e site [2],
                                            fault_t f [2]);
    sys_result_t r;
    longint unsigned af, bf, vq;
    longint unsigned q [2];
    bit e [2];
    af = a;
    bf = b;
    vq = 0;
    // input faults: apply the winning slot only
    for (int s = 0; s < 2; s++)
      if (site[s] == FS_IN_A) begin af = fm_apply(1, f[s], w, a); break; end
    for (int s = 0; s < 2; s++)
      if (site[s] == FS_IN_B) begin bf = fm_apply(1, f[s], w, b); break; end
    for (int u = 0; u < 2; u++) begin
      alu_site_e us = AS_OFF;
      fault_t uf = f[0];
      for (int s = 1; s >= 0; s--)
        if (fm_unit_site(u, site[s]) != AS_OFF) begin
          us = fm_unit_site(u, site[s]);
          uf = f[s];
        end
      fm_alu(w, af, bf, us, uf, q[u], e[u]);
    end
    r.e0   = e[0];
    r.e1   = e[1];
    r.sel1 = r.e0 && !r.e1;
    vq     = r.sel1 ? q[1] : q[0];
    r.quot = vq;
    for (int s = 0; s < 2; s++)
      if (site[s] == FS_VOTE) begin r.quot = fm_apply(1, f[s], w + 2, vq); break; end
    r.gold    = a + b;
    r.err_det = r.e0 || r.e1;
    r.corrupt = (r.quot != r.gold);
    return r;
  endfunction

endpackage
