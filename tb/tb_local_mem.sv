// tb_local_mem: self-checking test of a local buffer: random writes and reads
// against a scoreboard, read data one cycle after the request, read data held
// while no read is made, and no effect when the buffer is not selected.
module tb_local_mem;
  import codec_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic sel; bus_req_t bus_req; logic [15:0] rdata;
  int checks = 0, failures = 0;
  logic [15:0] sb [256];

  local_mem #(.DEPTH(256)) dut (.*);

  initial begin
    logic [15:0] want; logic pend;
    sel = 0; bus_req = '0; pend = 0; want = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); sel = 1; bus_req = '{valid: 1, write: 1, addr: 16'(a), wdata: 16'(a * 13 + 7)}; sb[a] = 16'(a * 13 + 7);
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (pend) begin checks++; if (rdata !== want) begin failures++; $display("read %h want %h", rdata, want); end end
      sel = ($urandom % 4 != 0);
      bus_req = '{valid: 1'($urandom), write: 1'($urandom), addr: 16'($urandom), wdata: 16'($urandom)};
      if (sel && bus_req.valid) begin
        if (bus_req.write) sb[bus_req.addr[7:0]] = bus_req.wdata;
        else begin want = sb[bus_req.addr[7:0]]; pend = 1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
