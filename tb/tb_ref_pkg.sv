// tb_ref_pkg: behavioural reference for the output format, used by the
// testbenches to work out the expected PCIe lines and metadata of an event
// from the SALT packets that went into it. It follows the format rules
// directly (lane hit lists, 64-bit Event Header, Flag Header, FTYPE, FLAGS,
// padding) and shares no code with the RTL.
package tb_ref_pkg;
  import dp_pkg::*;
  import tb_salt_pkg::*;

  class AsicPkt;
    int          kind;      // K_NORMAL, K_SPECIAL, K_NZS
    logic [5:0]  code;
    logic [11:0] bxid;
    logic [11:0] hits[$];
    bit          trunc;     // the block dropped it (truncation mode)
    function logic [7:0] head();
      if (trunc)              return {2'b01, CODE_TRUNC};
      if (kind == K_NORMAL)   return {2'b00, 6'(hits.size())};
      if (kind == K_NZS)      return {2'b01, CODE_NZS};
      return {2'b01, code};
    endfunction
  endclass

  class Event;
    AsicPkt p [NLANES][4];
  endclass

  // strip offset of ASIC a of lane l with the reset configuration
  function automatic logic [3:0] def_off(int l, int a);
    return 4'((4*l + a) % 4);
  endfunction

  function automatic void expect_packet(
    input  Event        e,
    input  logic [23:0] en,
    input  int          nasic,
    output logic [255:0] lines[$],
    output out_meta_t   meta
  );
    logic [15:0] lh [NLANES][$];
    logic [31:0] lheads [NLANES];
    logic [7:0]  nh [NLANES];
    bit act [NLANES];
    bit any_sp, all_eq, seen;
    logic [5:0] fc;
    logic [11:0] bx;
    int nl;
    logic [7:0] ft;
    logic [3:0] fl;
    seen = 0; any_sp = 0; all_eq = 1; fc = 0; bx = 0;
    for (int l = 0; l < NLANES; l++) begin
      bit lseen;
      lseen = 0;
      lh[l] = {};
      lheads[l] = 0;
      act[l] = 0;
      for (int a = 0; a < nasic; a++) begin
        if (!en[4*l+a]) continue;
        act[l] = 1;
        if (!seen && !lseen) bx = e.p[l][a].bxid;
        lseen = 1;
        lheads[l][8*a +: 8] = e.p[l][a].head();
        if (e.p[l][a].head()[6]) any_sp = 1; else all_eq = 0;
        if (!seen) fc = e.p[l][a].head()[5:0];
        else if (e.p[l][a].head()[5:0] != fc) all_eq = 0;
        seen = 1;
        if (e.p[l][a].kind == K_NORMAL && !e.p[l][a].trunc)
          foreach (e.p[l][a].hits[h]) lh[l].push_back({def_off(l, a), e.p[l][a].hits[h]});
      end
      nh[l] = 8'(lh[l].size());
    end
    if (!seen || fc == CODE_NZS) all_eq = 0;
    nl = 1;
    for (int l = 0; l < NLANES; l++) if ((int'(nh[l]) + 1) / 2 > nl) nl = (int'(nh[l]) + 1) / 2;
    if (all_eq) begin
      ft = FTYPE_SHORT; nl = 1;
      for (int l = 0; l < NLANES; l++) begin nh[l] = 0; lh[l] = {}; end
    end else if (any_sp) begin
      ft = FTYPE_FLAG; if (nl < 4) nl = 4;
    end else ft = FTYPE_NORMAL;
    fl = {1'b0, all_eq, all_eq ? type_summary(fc) : 2'b00};
    lines = {};
    for (int i = 0; i < nl; i++) begin
      logic [255:0] ln;
      ln = '0;
      if (i == 0) ln[255:192] = {bx, fl, nh[5], nh[4], nh[3], nh[2], nh[1], nh[0]};
      else if (ft == FTYPE_FLAG && i <= 3) ln[255:192] = {lheads[2*i-1], lheads[2*i-2]};
      for (int l = 0; l < NLANES; l++) begin
        if (2*i < lh[l].size())   ln[32*l +: 16]      = lh[l][2*i];
        if (2*i+1 < lh[l].size()) ln[32*l + 16 +: 16] = lh[l][2*i+1];
      end
      lines.push_back(ln);
    end
    meta = '{bxid: bx, ftype: ft, nlines: 8'(nl), flags: fl};
  endfunction
endpackage
