// tb_st_remap: self-checking test of the keyed remapping function.
//
// Two instances are tested: the R1 shape (80 -> 22 bits) and the R2 shape
// (90 -> 8 bits). Each output is compared against a reference model written
// here from the construction (S-box tables as printed for PRESENT and
// SPONGENT, XOR fold, affine P-boxes with rotate-XOR mixing, modular C-S
// fold). Statistical checks follow the selection criteria for remapping
// functions: single-bit input flips must change close to half of the output
// bits on average (avalanche), outputs must spread evenly over bin_cnt
// (uniformity), and changing the key psi alone must change the output.
module tb_st_remap;

  localparam int unsigned IN1 = 80, OUT1 = 22, MID1 = 40, SALT1 = 1;
  localparam int unsigned IN2 = 90, OUT2 = 8,  MID2 = 48, SALT2 = 2;

  int checks = 0, failures = 0;

  logic [IN1-1:0]  din1;
  logic [OUT1-1:0] dout1;
  logic [IN2-1:0]  din2;
  logic [OUT2-1:0] dout2;

  st_remap #(.IN_W(IN1), .OUT_W(OUT1), .MID_W(MID1), .SALT(SALT1)) dut1 (.din(din1), .dout(dout1));
  st_remap #(.IN_W(IN2), .OUT_W(OUT2), .MID_W(MID2), .SALT(SALT2)) dut2 (.din(din2), .dout(dout2));

  // ---------------- reference model ----------------
  byte unsigned present_s [16] = '{8'hC,8'h5,8'h6,8'hB,8'h9,8'h0,8'hA,8'hD,8'h3,8'hE,8'hF,8'h8,8'h4,8'h7,8'h1,8'h2};
  byte unsigned spongent_s[16] = '{8'hE,8'hD,8'hB,8'h0,8'h2,8'h1,8'h4,8'hF,8'h7,8'hA,8'h8,8'h5,8'h9,8'hC,8'h3,8'h6};

  typedef bit bits_t[];

  function automatic bits_t ref_sbox(bits_t x, bit flip);
    bits_t y = new[x.size()];
    for (int k = 0; k < x.size() / 4; k++) begin
      int v = x[4*k] | (x[4*k+1] << 1) | (x[4*k+2] << 2) | (x[4*k+3] << 3);
      int r = (((k % 2) == 1) != flip) ? spongent_s[v] : present_s[v];
      for (int j = 0; j < 4; j++) y[4*k+j] = r[j];
    end
    return y;
  endfunction

  function automatic int ref_mult(int n, int salt);
    int c[8] = '{7, 11, 13, 17, 19, 23, 29, 31};
    for (int k = 0; k < 8; k++) begin
      int cc = c[(k + salt) % 8];
      if ((n % cc) != 0 && cc < n) return cc;
    end
    return 1;
  endfunction

  function automatic bits_t ref_pbox(bits_t x, int salt, int stage);
    int n = x.size();
    int a = ref_mult(n, salt + stage);
    int b = (salt * 5 + stage * 3 + 1) % n;
    bits_t y = new[n];
    for (int i = 0; i < n; i++) y[(a * i + b) % n] = x[i];
    return y;
  endfunction

  // y[i] = x[i] ^ x[i-a] ^ x[i-b] (indices mod n): XOR with two left rotations
  function automatic bits_t ref_mix(bits_t x, int a, int b);
    int n = x.size();
    bits_t y = new[n];
    for (int i = 0; i < n; i++) y[i] = x[i] ^ x[(i - a + n) % n] ^ x[(i - b + n) % n];
    return y;
  endfunction

  function automatic bits_t ref_remap(bits_t din, int mid, int outw, int salt);
    bits_t wide = new[2*mid];
    bits_t lo = new[mid], hi = new[mid], s2 = new[mid], t, u;
    bits_t res = new[outw];
    for (int i = 0; i < 2*mid; i++) wide[i] = (i < din.size()) ? din[i] : 1'b0;
    for (int i = 0; i < mid; i++) begin lo[i] = wide[i]; hi[i] = wide[i+mid]; end
    lo = ref_sbox(lo, 0);
    hi = ref_sbox(hi, 1);
    for (int i = 0; i < mid; i++) s2[i] = lo[i] ^ hi[i];
    t = ref_sbox(s2, 1);
    t = ref_pbox(t, salt, 0);
    t = ref_mix(t, 7, 19);
    t = ref_pbox(t, salt, 1);
    t = ref_mix(t, 5, 13);
    t = ref_pbox(t, salt, 2);
    u = ref_sbox(t, 0);
    for (int j = 0; j < outw; j++) res[j] = 1'b0;
    for (int i = 0; i < mid; i++) res[i % outw] ^= u[i];
    return res;
  endfunction

  function automatic logic [OUT1-1:0] ref1(logic [IN1-1:0] x);
    bits_t b = new[IN1], r;
    logic [OUT1-1:0] o;
    for (int i = 0; i < IN1; i++) b[i] = x[i];
    r = ref_remap(b, MID1, OUT1, SALT1);
    for (int i = 0; i < OUT1; i++) o[i] = r[i];
    return o;
  endfunction

  function automatic logic [OUT2-1:0] ref2(logic [IN2-1:0] x);
    bits_t b = new[IN2], r;
    logic [OUT2-1:0] o;
    for (int i = 0; i < IN2; i++) b[i] = x[i];
    r = ref_remap(b, MID2, OUT2, SALT2);
    for (int i = 0; i < OUT2; i++) o[i] = r[i];
    return o;
  endfunction

  function automatic logic [IN1-1:0] rnd80();
    return {$urandom(), $urandom(), $urandom()};
  endfunction
  function automatic logic [IN2-1:0] rnd90();
    return {$urandom(), $urandom(), $urandom()};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned flips, nflip;
    int bin_cnt [16];
    int keydiff;
    logic [OUT1-1:0] base1;
    logic [IN1-1:0]  x;

    // 1. exact agreement with the reference model
    for (int n = 0; n < 300; n++) begin
      din1 = (n == 0) ? '0 : rnd80();
      din2 = (n == 0) ? '1 : rnd90();
      #1;
      check(dout1 == ref1(din1), $sformatf("R1 shape mismatch din=%h dut=%h ref=%h", din1, dout1, ref1(din1)));
      check(dout2 == ref2(din2), $sformatf("R2 shape mismatch din=%h dut=%h ref=%h", din2, dout2, ref2(din2)));
    end

    // 2. avalanche: average fraction of output bits changed by one input flip
    flips = 0; nflip = 0;
    for (int n = 0; n < 40; n++) begin
      x = rnd80();
      din1 = x; #1; base1 = dout1;
      for (int b = 0; b < IN1; b++) begin
        din1 = x ^ (80'd1 << b); #1;
        flips += $countones(dout1 ^ base1);
        nflip++;
      end
    end
    $display("avalanche: %0d/%0d output bits changed (%0d%%)", flips, nflip * OUT1, flips * 100 / (nflip * OUT1));
    check(flips * 100 / (nflip * OUT1) >= 35 && flips * 100 / (nflip * OUT1) <= 65, "avalanche outside 35..65%");

    // 3. uniformity of the 4 low output bits over sequential addresses
    foreach (bin_cnt[i]) bin_cnt[i] = 0;
    for (int n = 0; n < 3200; n++) begin
      din1 = {32'h1234_5678, 48'h7f00_0040_0000 + 48'(n * 4)}; #1;
      bin_cnt[dout1[3:0]]++;
    end
    foreach (bin_cnt[i]) check(bin_cnt[i] > 120 && bin_cnt[i] < 280, $sformatf("bin %0d holds %0d of 3200", i, bin_cnt[i]));

    // 4. key sensitivity: same address, different psi
    keydiff = 0;
    for (int n = 0; n < 200; n++) begin
      x = rnd80();
      din1 = x; #1; base1 = dout1;
      din1 = {x[79:48] ^ $urandom(), x[47:0]}; #1;
      if (dout1 != base1) keydiff++;
    end
    check(keydiff >= 195, $sformatf("psi change altered only %0d of 200 outputs", keydiff));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
