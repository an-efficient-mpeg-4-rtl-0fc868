// tb_bus_arbiter: self-checking test of the system bus arbiter. With random
// AREQ/LOCK sequences from a DMA model and random RISC requests it checks,
// cycle by cycle against its own model, that GRANT rises one cycle after
// AREQ, stays up while AREQ or LOCK is high (LOCK may outlast AREQ), falls
// one cycle after both are low, that the RISC is stalled exactly while GRANT
// is high, and that the bus carries the granted master's request.
module tb_bus_arbiter;
  import codec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic areq, lock, grant, risc_ready;
  bus_req_t risc_req, dma_req, bus_req;
  int checks = 0, failures = 0, grants = 0;
  logic exp_grant;

  bus_arbiter dut (.*);

  always @(posedge clk) begin
    if (!rst_n) exp_grant <= 0;
    else if (!exp_grant && areq) exp_grant <= 1;
    else if (exp_grant && !areq && !lock) exp_grant <= 0;
  end

  initial begin
    areq = 0; lock = 0; risc_req = '0; dma_req = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (grant !== exp_grant) begin failures++; $display("cycle %0d: grant %b want %b", i, grant, exp_grant); end
      // DMA model: request, lock while granted, release
      if (!areq && !lock) areq = ($urandom % 8 == 0);
      else if (areq && grant && !lock) lock = 1;
      else if (lock && areq && ($urandom % 10 == 0)) areq = 0;   // AREQ may fall first,
      else if (lock && !areq && ($urandom % 3 == 0)) lock = 0;   // the bus is held until LOCK falls
      risc_req = '{valid: 1'($urandom), write: 1'($urandom), addr: 16'($urandom), wdata: 16'($urandom)};
      dma_req  = '{valid: grant, write: 1'($urandom), addr: 16'($urandom), wdata: 16'($urandom)};
      #1;
      checks++;
      if (risc_ready !== !grant) begin failures++; $display("risc_ready wrong"); end
      checks++;
      if (bus_req !== (grant ? dma_req : (risc_req.valid ? risc_req : '0))) begin failures++; $display("bus mux wrong"); end
      if (grant) grants++;
    end
    checks++; if (grants == 0) begin failures++; $display("never granted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
