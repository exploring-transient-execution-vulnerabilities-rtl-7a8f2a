// tb_branch_history: checks the GHR and BHB shift registers against a model.
// GHR must shift in the outcome of conditional branches only; BHB must shift
// by two and absorb the 16-bit XOR fold of the address on taken branches
// only; nothing changes without upd_valid.
module tb_branch_history;
  logic clk = 0, rst_n = 0, upd_valid = 0, upd_cond = 0, upd_taken = 0;
  logic [47:0] upd_ip = 0;
  logic [57:0] bhb;
  logic [15:0] ghr;
  int checks = 0, failures = 0;

  branch_history dut (.*);
  always #5 clk = ~clk;

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
    logic [57:0] mb; logic [15:0] mg, f;
    mb = 0; mg = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(bhb == 0 && ghr == 0, "reset values");
    for (int n = 0; n < 5000; n++) begin
      upd_valid = $urandom_range(0, 3) != 0;
      upd_cond = $urandom_range(0, 1);
      upd_taken = $urandom_range(0, 1);
      upd_ip = {$urandom(), $urandom()};
      f = upd_ip[15:0] ^ upd_ip[31:16] ^ upd_ip[47:32];
      if (upd_valid) begin
        if (upd_cond) mg = {mg[14:0], upd_taken};
        if (upd_taken) mb = {mb[55:0], 2'b00} ^ {42'd0, f};
      end
      @(negedge clk);
      check(ghr == mg, $sformatf("ghr %h expected %h", ghr, mg));
      check(bhb == mb, $sformatf("bhb %h expected %h", bhb, mb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
