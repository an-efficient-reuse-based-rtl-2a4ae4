// kasumi_ref_pkg - untimed reference model of KASUMI for the testbenches.
//
// A plain, sequential transcription of the KASUMI specification: FI, FO, FL,
// the key schedule and the eight-round cipher, written independently of the
// RTL (no shared code, different data layout). The S-box tables are loaded by
// load_tables() from the same table files the ROMs use; the known-answer
// vector checked in the testbenches (3GPP KASUMI test set 1) confirms the
// tables and the whole model at once.
package kasumi_ref_pkg;

  logic [6:0] s7_tab [128];
  logic [8:0] s9_tab [512];

  // KASUMI test set 1.
  localparam logic [127:0] KAT_KEY = 128'h2BD6459F82C5B300952C49104881FF48;
  localparam logic [63:0]  KAT_PT  = 64'hEA024714AD5C4D84;
  localparam logic [63:0]  KAT_CT  = 64'hDF1F9B251C0BF45F;

  typedef struct {
    logic [15:0] kl [2];
    logic [15:0] ko [3];
    logic [15:0] ki [3];
  } ref_rk_t;

  function automatic void load_tables();
    $readmemh("rtl/kasumi_s7.hex", s7_tab);
    $readmemh("rtl/kasumi_s9.hex", s9_tab);
  endfunction

  function automatic logic [15:0] rotl(input logic [15:0] w, input int n);
    logic [15:0] t;
    t = w;
    for (int i = 0; i < n; i++) t = {t[14:0], t[15]};
    return t;
  endfunction

  function automatic logic [15:0] fi(input logic [15:0] in, input logic [15:0] ki);
    logic [8:0] l, nl;
    logic [6:0] r7;
    logic [8:0] r9;
    // round 1
    l  = in[15:7];
    r7 = in[6:0];
    r9 = s9_tab[l] ^ {2'b0, r7};
    nl = {2'b0, r7};
    // round 2
    r7 = s7_tab[nl[6:0]] ^ r9[6:0];
    r7 = r7 ^ ki[15:9];
    l  = r9 ^ ki[8:0];
    // round 3
    r9 = s9_tab[l] ^ {2'b0, r7};
    // round 4
    r7 = s7_tab[r7] ^ r9[6:0];
    return {r7, r9};
  endfunction

  function automatic logic [31:0] fo(input logic [31:0] in, input logic [15:0] ko [3],
                                     input logic [15:0] ki [3]);
    logic [15:0] l, r, t;
    l = in[31:16];
    r = in[15:0];
    for (int j = 0; j < 3; j++) begin
      t = fi(l ^ ko[j], ki[j]) ^ r;
      l = r;
      r = t;
    end
    return {l, r};
  endfunction

  function automatic logic [31:0] fl(input logic [31:0] in, input logic [15:0] kl [2]);
    logic [15:0] l, r;
    l = in[31:16];
    r = in[15:0];
    r = r ^ rotl(l & kl[0], 1);
    l = l ^ rotl(r | kl[1], 1);
    return {l, r};
  endfunction

  // Round keys of round i (0-based, 0..7).
  function automatic ref_rk_t round_keys(input logic [127:0] key, input int i);
    logic [15:0] k [8];
    logic [15:0] kp [8];
    logic [15:0] c [8];
    ref_rk_t rk;
    c = '{16'h0123, 16'h4567, 16'h89AB, 16'hCDEF, 16'hFEDC, 16'hBA98, 16'h7654, 16'h3210};
    for (int j = 0; j < 8; j++) begin
      k[j]  = key[127-16*j -: 16];
      kp[j] = k[j] ^ c[j];
    end
    rk.kl[0] = rotl(k[i], 1);
    rk.kl[1] = kp[(i+2)%8];
    rk.ko[0] = rotl(k[(i+1)%8], 5);
    rk.ko[1] = rotl(k[(i+5)%8], 8);
    rk.ko[2] = rotl(k[(i+6)%8], 13);
    rk.ki[0] = kp[(i+4)%8];
    rk.ki[1] = kp[(i+3)%8];
    rk.ki[2] = kp[(i+7)%8];
    return rk;
  endfunction

  function automatic logic [63:0] kasumi(input logic [127:0] key, input logic [63:0] pt);
    logic [31:0] l, r, f;
    ref_rk_t rk;
    l = pt[63:32];
    r = pt[31:0];
    for (int i = 0; i < 8; i++) begin
      rk = round_keys(key, i);
      if (i % 2 == 0) f = fo(fl(l, rk.kl), rk.ko, rk.ki);
      else            f = fl(fo(l, rk.ko, rk.ki), rk.kl);
      f = f ^ r;
      r = l;
      l = f;
    end
    return {l, r};
  endfunction

endpackage
