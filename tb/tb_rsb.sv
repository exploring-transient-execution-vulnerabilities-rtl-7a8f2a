// tb_rsb: checks the return stack buffer against a queue model: pushes and
// pops in random order, the visible top entry, emptiness, overflow that
// discards the oldest entry, and underflow that leaves the stack unchanged.
module tb_rsb;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [31:0] push_data = 0, top;
  logic empty, overflow, underflow;
  int checks = 0, failures = 0, n_ovf = 0, n_udf = 0;

  rsb #(.DEPTH(DEPTH), .DATA_W(32)) dut (.*);
  always #5 clk = ~clk;

  logic [31:0] model [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int op;
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) check(top == model[$], $sformatf("top %h expected %h", top, model[$]));
      // phases biased toward filling or draining
      op = $urandom_range(0, 99) < (((n / 500) % 2 == 0) ? 70 : 30) ? 1 : 2;
      push = (op == 1); pop = (op == 2); push_data = $urandom();
      #1;
      check(overflow == (push && model.size() == DEPTH), "overflow flag");
      check(underflow == (pop && model.size() == 0), "underflow flag");
      if (overflow) n_ovf++;
      if (underflow) n_udf++;
      if (push) begin
        if (model.size() == DEPTH) void'(model.pop_front());
        model.push_back(push_data);
      end else if (pop && model.size() > 0) void'(model.pop_back());
      @(posedge clk); #1;
      push = 0; pop = 0;
    end
    check(n_ovf > 0 && n_udf > 0, "overflow and underflow must both occur");
    $display("overflows %0d underflows %0d", n_ovf, n_udf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
