// sdram_model: behavioural model of the external 16 Mbit SDRAM (2 banks x 2048
// rows x 256 columns x 16 bit) for simulation only. It decodes the
// cs_n/ras_n/cas_n/we_n commands on the rising clock edge, keeps the open row
// of each bank, returns read data CL cycles after a READ, stores the data of
// a WRITE, and counts protocol errors: an access to a bank with no open row,
// an access before tRCD, an activate to an open bank, a refresh while a row
// is open, a command sooner than tRFC after a refresh, and any access before
// the mode register was set. Commands before the first precharge-all
// (the start of the power-up sequence) are ignored. Memory content is kept in an associative array;
// unwritten words read as {bank,row[6:0],col} so tests can predict them.
module sdram_model #(
  parameter int unsigned CL    = 2,
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_RFC = 3
) (
  input  logic        clk,
  input  logic        cs_n, ras_n, cas_n, we_n,
  input  logic [0:0]  ba,
  input  logic [10:0] addr,
  input  logic [15:0] dq_in,
  input  logic        dq_oe,
  output logic [15:0] dq_out,
  output int          errors,
  output int          n_act, n_pre, n_ref, n_rd, n_wr
);
  logic [15:0] mem [int];
  logic        open [2];
  logic [10:0] row [2];
  int          act_time [2];
  int          ref_time;
  int          cyc;
  logic        mode_set;
  logic        powered;
  logic [15:0] rd_q [$];
  logic        rd_v [$];

  function automatic logic [15:0] peek(input int a);
    if (mem.exists(a)) return mem[a];
    return 16'(a[8:0]) ^ 16'({a[15:9], 9'b0});
  endfunction

  task automatic err(input string why);
    errors++;
    if (errors <= 5) $display("sdram_model: %s at cycle %0d", why, cyc);
  endtask

  initial begin
    errors = 0; n_act = 0; n_pre = 0; n_ref = 0; n_rd = 0; n_wr = 0;
    open[0] = 0; open[1] = 0; row[0] = '0; row[1] = '0; cyc = 0; ref_time = -100;
    act_time[0] = -100; act_time[1] = -100; mode_set = 0; powered = 0; dq_out = '0;
    for (int i = 0; i < CL - 1; i++) begin rd_q.push_back('0); rd_v.push_back(1'b0); end
  end

  always @(posedge clk) begin
    logic [15:0] d; logic v; int a;
    cyc++;
    // read pipeline: data of a READ appears CL-1 edges after the command edge
    rd_q.push_back('0); rd_v.push_back(1'b0);
    if (powered && !cs_n && cyc - ref_time < int'(T_RFC) && {ras_n, cas_n, we_n} != 3'b111) err("command within tRFC of a refresh");
    // commands before the first precharge-all of the power-up sequence are ignored
    if (!powered && !cs_n && {ras_n, cas_n, we_n} == 3'b010 && addr[10]) powered = 1;
    if (!cs_n && powered) begin
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin // ACTIVE
          if (open[ba]) err("activate to an open bank");
          open[ba] = 1; row[ba] = addr; act_time[ba] = cyc; n_act++;
        end
        3'b010: begin // PRECHARGE
          if (addr[10]) begin open[0] = 0; open[1] = 0; end else open[ba] = 0;
          n_pre++;
        end
        3'b001: begin // AUTO REFRESH
          if (open[0] || open[1]) err("refresh with a row open");
          ref_time = cyc; n_ref++;
        end
        3'b000: mode_set = 1; // MODE REGISTER SET
        3'b101, 3'b100: begin // READ / WRITE
          if (!open[ba] || !mode_set) err("access to a closed bank");
          if (cyc - act_time[ba] < int'(T_RCD)) err("access before tRCD");
          a = {ba, row[ba], addr[7:0]};
          if (we_n) begin
            rd_q[rd_q.size()-1] = peek(a); rd_v[rd_v.size()-1] = 1'b1; n_rd++;
          end else begin
            if (!dq_oe) err("write without data");
            mem[a] = dq_in; n_wr++;
          end
        end
        default: ;
      endcase
    end
    d = rd_q.pop_front(); v = rd_v.pop_front();
    if (v) dq_out <= d;
  end
endmodule
