// tb_bus_decoder: self-checking test of the bus address decoder. For random
// addresses across the map it checks the slave select against the address
// map (OF_BUF 0x4000-0x43FF, OS_BUF 0x5000-0x5FFF, ME 0x6000-0x63FF, DMA
// 0x7000-0x700F, expansion 0x8000-0xFFFF, nothing elsewhere) and that read
// data one cycle later comes from the slave that was read, or zero.
module tb_bus_decoder;
  import codec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t bus_req; logic [4:0] sel; logic [4:0][15:0] slave_rdata; logic [15:0] rdata;
  int checks = 0, failures = 0;

  bus_decoder dut (.*);

  function automatic logic [4:0] exp_sel(logic [15:0] a);
    if (a >= 16'h4000 && a < 16'h4400) return 5'b00001;
    if (a >= 16'h5000 && a < 16'h6000) return 5'b00010;
    if (a >= 16'h6000 && a < 16'h6400) return 5'b00100;
    if (a >= 16'h7000 && a < 16'h7010) return 5'b01000;
    if (a >= 16'h8000)                 return 5'b10000;
    return 5'b00000;
  endfunction

  initial begin
    logic [4:0] prev; logic prev_rd;
    bus_req = '0; slave_rdata = '0; prev = '0; prev_rd = 0;
    for (int i = 0; i < 5; i++) slave_rdata[i] = 16'h1111 * (i + 1);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // read data of the previous cycle's request
      checks++;
      if (rdata !== ((prev_rd && prev != 0) ? slave_rdata[$clog2(prev)] : 16'h0)) begin
        failures++; $display("rdata %h for sel %b", rdata, prev);
      end
      bus_req.valid = 1'($urandom);
      bus_req.write = 1'($urandom);
      case ($urandom % 6)
        0: bus_req.addr = 16'h4000 + 16'($urandom % 'h500);
        1: bus_req.addr = 16'h5000 + 16'($urandom % 'h1000);
        2: bus_req.addr = 16'h6000 + 16'($urandom % 'h500);
        3: bus_req.addr = 16'h7000 + 16'($urandom % 'h20);
        default: bus_req.addr = 16'($urandom);
      endcase
      #1;
      checks++;
      if (sel !== exp_sel(bus_req.addr)) begin failures++; $display("addr %h sel %b want %b", bus_req.addr, sel, exp_sel(bus_req.addr)); end
      prev = sel; prev_rd = bus_req.valid && !bus_req.write;
    end
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
