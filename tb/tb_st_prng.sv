// tb_st_prng: checks the token generator against an xorshift64 model.
// After reset the state must equal the seed, advance only while `next` is
// high, follow the 13/7/17 xorshift recurrence, take a reseed, never become
// zero, and produce distinct words over a long run.
module tb_st_prng;
  logic clk = 0, rst_n = 0, next = 0, reseed = 0;
  logic [63:0] reseed_val = '0, value, model;
  int checks = 0, failures = 0;
  localparam logic [63:0] SEED = 64'h0123_4567_89AB_CDEF;

  st_prng #(.SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [63:0] xs(logic [63:0] s);
    s ^= s << 13; s ^= s >> 7; s ^= s << 17;
    return s;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] seen [$];
    bit dup;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    model = SEED;
    check(value == model, "state after reset is not the seed");
    // hold: no advance without next
    repeat (3) @(negedge clk);
    check(value == model, "state advanced without next");
    // run
    for (int n = 0; n < 2000; n++) begin
      next = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (next) model = xs(model);
      check(value == model, $sformatf("step %0d: %h expected %h", n, value, model));
      check(value != 0, "zero state");
      if (next) seen.push_back(value);
    end
    next = 0;
    // reseed
    reseed = 1; reseed_val = 64'hFFFF_0000_FFFF_0000;
    @(negedge clk);
    reseed = 0;
    model = model ^ 64'hFFFF_0000_FFFF_0000;
    check(value == model, "reseed not applied");
    // a reseed that would zero the state is ignored
    reseed = 1; reseed_val = value;
    @(negedge clk);
    reseed = 0;
    check(value == model && value != 0, "zeroing reseed accepted");
    // distinct outputs
    dup = 0;
    foreach (seen[i]) for (int j = i + 1; j < seen.size() && j < i + 200; j++) if (seen[i] == seen[j]) dup = 1;
    check(!dup, "repeated output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
