// kasumi_ref_pkg: behavioural reference model of KASUMI and f8 for the
// testbenches. Written directly from the algorithm definition (per-round key
// formulas with modular indices, explicit half swaps), independently of the
// register-level structure of the RTL; only the S-box tables are shared.
// The tables themselves are checked by the published KASUMI/f8 test vector
// used in the core testbenches.
package kasumi_ref_pkg;
  import kasumi_pkg::S7_TABLE;
  import kasumi_pkg::S9_TABLE;

  localparam logic [15:0] C_REF [8] = '{16'h0123, 16'h4567, 16'h89AB, 16'hCDEF,
                                        16'hFEDC, 16'hBA98, 16'h7654, 16'h3210};

  function automatic logic [15:0] rl(input logic [15:0] x, input int n);
    logic [31:0] d;
    d = {x, x} << n;
    return d[31:16];
  endfunction

  function automatic logic [15:0] fi_ref(input logic [15:0] in, input logic [15:0] ki);
    logic [8:0] nine;
    logic [6:0] seven;
    nine  = in[15:7];
    seven = in[6:0];
    nine  = S9_TABLE[nine] ^ {2'b0, seven};
    seven = S7_TABLE[seven] ^ nine[6:0];
    seven = seven ^ ki[15:9];
    nine  = nine ^ ki[8:0];
    nine  = S9_TABLE[nine] ^ {2'b0, seven};
    seven = S7_TABLE[seven] ^ nine[6:0];
    return {seven, nine};
  endfunction

  function automatic logic [31:0] fo_ref(input logic [31:0] in,
      input logic [15:0] ko [3], input logic [15:0] ki [3]);
    logic [15:0] l, r, t;
    l = in[31:16];
    r = in[15:0];
    for (int j = 0; j < 3; j++) begin
      t = fi_ref(l ^ ko[j], ki[j]) ^ r;
      l = r;
      r = t;
    end
    return {l, r};
  endfunction

  function automatic logic [31:0] fl_ref(input logic [31:0] in, input logic [15:0] kl1,
                                         input logic [15:0] kl2);
    logic [15:0] l, r;
    l = in[31:16];
    r = in[15:0];
    r = r ^ rl(l & kl1, 1);
    l = l ^ rl(r | kl2, 1);
    return {l, r};
  endfunction

  // Subkeys of round rnd (0-based) as {KL1,KL2,KO1,KO2,KO3,KI1,KI2,KI3}.
  function automatic logic [127:0] subkeys_ref(input logic [127:0] key, input int rnd);
    logic [15:0] k [8];
    logic [15:0] kp [8];
    for (int j = 0; j < 8; j++) begin
      k[j]  = key[127-16*j -: 16];
      kp[j] = k[j] ^ C_REF[j];
    end
    return {rl(k[rnd % 8], 1), kp[(rnd + 2) % 8],
            rl(k[(rnd + 1) % 8], 5), rl(k[(rnd + 5) % 8], 8), rl(k[(rnd + 6) % 8], 13),
            kp[(rnd + 4) % 8], kp[(rnd + 3) % 8], kp[(rnd + 7) % 8]};
  endfunction

  function automatic logic [63:0] kasumi_ref(input logic [63:0] din, input logic [127:0] key);
    logic [31:0] l, r, f;
    logic [127:0] sk;
    logic [15:0] ko [3];
    logic [15:0] ki [3];
    l = din[63:32];
    r = din[31:0];
    for (int i = 0; i < 8; i++) begin
      sk = subkeys_ref(key, i);
      ko = '{sk[95:80], sk[79:64], sk[63:48]};
      ki = '{sk[47:32], sk[31:16], sk[15:0]};
      if (i % 2 == 0) f = fo_ref(fl_ref(l, sk[127:112], sk[111:96]), ko, ki);
      else            f = fl_ref(fo_ref(l, ko, ki), sk[127:112], sk[111:96]);
      {l, r} = {r ^ f, l};
    end
    return {l, r};
  endfunction

  // f8 keystream block n (0-based) of a message.
  function automatic logic [63:0] f8_ks_ref(input logic [127:0] ck, input logic [31:0] count,
      input logic [4:0] bearer, input logic dir, input int n);
    logic [63:0] a, ks;
    a  = kasumi_ref({count, bearer, dir, 26'b0}, ck ^ {16{8'h55}});
    ks = '0;
    for (int b = 0; b <= n; b++) ks = kasumi_ref(a ^ 64'(b) ^ ks, ck);
    return ks;
  endfunction
endpackage
