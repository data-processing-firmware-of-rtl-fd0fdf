// tb_salt_pkg: stimulus helpers shared by the testbenches. Builds SALT
// packets as the framework delivers them: MSB first, header of 12-bit BXID,
// parity, type bit and 6-bit count/code, then 12-bit hits packed back to back,
// the packet padded with zeros to a whole number of W-bit words. Words are
// returned right-aligned in 40-bit containers.
package tb_salt_pkg;
  import dp_pkg::*;

  localparam int K_NORMAL  = 0;
  localparam int K_SPECIAL = 1;
  localparam int K_NZS     = 2;

  function automatic void make_packet(
    input  int          w,
    input  logic [11:0] bxid,
    input  int          kind,
    input  logic [5:0]  code,
    input  logic [11:0] hits[$],
    output logic [39:0] words[$]
  );
    bit q[$];
    int nbits;
    logic [5:0] field;
    field = (kind == K_NORMAL) ? 6'(hits.size()) : (kind == K_NZS ? CODE_NZS : code);
    for (int i = 11; i >= 0; i--) q.push_back(bxid[i]);
    q.push_back(^{bxid, field});
    q.push_back(kind != K_NORMAL);
    for (int i = 5; i >= 0; i--) q.push_back(field[i]);
    if (kind == K_NORMAL)
      foreach (hits[h]) for (int i = 11; i >= 0; i--) q.push_back(hits[h][i]);
    else if (kind == K_NZS)
      for (int i = 0; i < NZS_BITS - 20; i++) q.push_back(1'($urandom));
    nbits = q.size();
    while (q.size() % w != 0) q.push_back(1'b0);
    words = {};
    for (int k = 0; k < q.size() / w; k++) begin
      logic [39:0] wd;
      wd = '0;
      for (int i = 0; i < w; i++) wd[w-1-i] = q[k*w + i];
      words.push_back(wd);
    end
  endfunction

  function automatic logic [11:0] rand_hit();
    return 12'($urandom);
  endfunction
endpackage
