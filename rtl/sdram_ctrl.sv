// sdram_ctrl: controller for the external 16 Mbit SDRAM frame memory
// (2 banks x 2048 rows x 256 columns x 16 bit), clocked by the 27 MHz system clock.
//
// It holds the parts the frame memory interface draws around the SDRAM:
//  - SYS_INI: the power-up sequence (wait, precharge all, two auto refreshes,
//    mode register set with burst length 1 and CAS latency CL);
//  - Refresh control: a counter that raises a refresh request every
//    REF_INTERVAL cycles; the state machine closes all rows and refreshes;
//  - SDRAM_SM: keeps one row open per bank; a word request that hits an open
//    row is accepted at once, a miss first precharges and/or activates;
//  - ADDR_MUX: splits the 20-bit word address into row [19:9], bank [8], column [7:0];
//  - SDRAM_SG: registered command pins cs_n/ras_n/cas_n/we_n, bank and address;
//  - DATA PATH: registered write data with its output enable, and a capture
//    register for read data.
// Word interface: req_valid/req_we/req_addr/req_wdata are taken when
// req_ready is high (combinational from the state and the address). Accepted
// words go out one per cycle as burst-length-1 READ/WRITE commands, so a run
// of hits inside open rows streams at one word per clock. Read data comes
// back on rd_valid/rd_data CL+2 cycles after acceptance (one cycle in the pin
// register, CL in the SDRAM, one in the capture register), in order.
// A write is not accepted while read data is still in flight, so the data bus
// never has two drivers.
// The chip, its organisation and the shared system clock follow the
// document; the address split, burst length 1, the open-row policy and every
// timing value (given in cycles) are this design's own choices. tRAS is
// covered because a row is never closed sooner than tRCD plus one access
// after it was opened, which is at least 3 cycles; the default timings suit
// a 37 ns clock.
module sdram_ctrl
  import codec_pkg::*;
#(
  parameter int unsigned CL           = 2,     // CAS latency
  parameter int unsigned T_RCD        = 2,     // activate to read/write
  parameter int unsigned T_RP         = 2,     // precharge to activate/refresh
  parameter int unsigned T_RFC        = 3,     // refresh to next command (~80 ns)
  parameter int unsigned T_MRD        = 2,     // mode register set to next command
  parameter int unsigned T_WR         = 2,     // last write to precharge
  parameter int unsigned INIT_WAIT    = 5400,  // 200 us power-up wait at 27 MHz
  parameter int unsigned REF_INTERVAL = 420    // 64 ms / 4096 rows = 15.6 us at 27 MHz
) (
  input  logic             clk,
  input  logic             rst_n,
  // word request interface
  input  logic             req_valid,
  input  logic             req_we,
  input  logic [SD_AW-1:0] req_addr,
  input  logic [15:0]      req_wdata,
  output logic             req_ready,
  output logic             rd_valid,
  output logic [15:0]      rd_data,
  output logic             init_done,
  output logic             refresh_tick,  // one pulse per auto refresh issued
  // SDRAM pins
  output logic             sd_cs_n,
  output logic             sd_ras_n,
  output logic             sd_cas_n,
  output logic             sd_we_n,
  output logic [SD_BANK_W-1:0] sd_ba,
  output logic [SD_ROW_W-1:0]  sd_addr,
  output logic [15:0]      sd_dq_out,
  output logic             sd_dq_oe,
  input  logic [15:0]      sd_dq_in
);

  // {cs_n, ras_n, cas_n, we_n}
  typedef enum logic [3:0] {
    CMD_NOP   = 4'b0111,
    CMD_ACT   = 4'b0011,
    CMD_READ  = 4'b0101,
    CMD_WRITE = 4'b0100,
    CMD_PRE   = 4'b0010,
    CMD_REF   = 4'b0001,
    CMD_MRS   = 4'b0000
  } sd_cmd_e;

  typedef enum logic [2:0] {
    S_INIT_WAIT, S_INIT_REF1, S_INIT_REF2, S_INIT_MRS, S_READY, S_WAIT
  } state_e;

  localparam int unsigned WCW = 16;

  state_e           state, state_after;
  logic [WCW-1:0]   wait_cnt;
  logic [1:0]       row_open;
  logic [SD_ROW_W-1:0] open_row [2];
  logic [15:0]      ref_cnt;
  logic             ref_pending;
  logic [3:0]       wr_recover;
  logic [CL+1:0]    rd_pipe;

  // ADDR_MUX
  logic [SD_ROW_W-1:0]  a_row;
  logic [SD_BANK_W-1:0] a_bank;
  logic [SD_COL_W-1:0]  a_col;
  assign a_col  = req_addr[SD_COL_W-1:0];
  assign a_bank = req_addr[SD_COL_W +: SD_BANK_W];
  assign a_row  = req_addr[SD_COL_W+SD_BANK_W +: SD_ROW_W];

  logic hit, reads_in_flight;
  assign hit = row_open[a_bank] && (open_row[a_bank] == a_row);
  assign reads_in_flight = |rd_pipe[CL:0];

  assign req_ready = (state == S_READY) && !ref_pending && req_valid && hit &&
                     !(req_we && reads_in_flight);

  // command chosen this cycle (SDRAM_SM), registered onto the pins (SDRAM_SG)
  sd_cmd_e             cmd;
  logic [SD_BANK_W-1:0] cmd_ba;
  logic [SD_ROW_W-1:0]  cmd_addr;
  logic                 cmd_wr_data;
  logic [WCW-1:0]       cmd_wait;
  state_e               cmd_next;
  logic                 go_wait;

  always_comb begin
    cmd         = CMD_NOP;
    cmd_ba      = '0;
    cmd_addr    = '0;
    cmd_wr_data = 1'b0;
    cmd_wait    = '0;
    cmd_next    = S_READY;
    go_wait     = 1'b0;
    unique case (state)
      S_INIT_WAIT: if (wait_cnt == 0) begin
        cmd = CMD_PRE; cmd_addr[10] = 1'b1; go_wait = 1'b1;
        cmd_wait = WCW'(T_RP); cmd_next = S_INIT_REF1;
      end
      S_INIT_REF1: begin
        cmd = CMD_REF; go_wait = 1'b1; cmd_wait = WCW'(T_RFC); cmd_next = S_INIT_REF2;
      end
      S_INIT_REF2: begin
        cmd = CMD_REF; go_wait = 1'b1; cmd_wait = WCW'(T_RFC); cmd_next = S_INIT_MRS;
      end
      S_INIT_MRS: begin
        // burst length 1, sequential, CAS latency CL, single-location write
        cmd = CMD_MRS; cmd_addr = SD_ROW_W'({4'b0000, 3'(CL), 1'b0, 3'b000});
        go_wait = 1'b1; cmd_wait = WCW'(T_MRD); cmd_next = S_READY;
      end
      S_READY: begin
        if (ref_pending) begin
          if (row_open != 2'b00) begin
            if (wr_recover == 0) begin
              cmd = CMD_PRE; cmd_addr[10] = 1'b1; go_wait = 1'b1;
              cmd_wait = WCW'(T_RP); cmd_next = S_READY;
            end
          end else begin
            cmd = CMD_REF; go_wait = 1'b1; cmd_wait = WCW'(T_RFC); cmd_next = S_READY;
          end
        end else if (req_valid) begin
          if (hit) begin
            if (!(req_we && reads_in_flight)) begin
              cmd = req_we ? CMD_WRITE : CMD_READ;
              cmd_ba = a_bank;
              cmd_addr = SD_ROW_W'(a_col);
              cmd_wr_data = req_we;
            end
          end else if (row_open[a_bank]) begin
            if (wr_recover == 0) begin
              cmd = CMD_PRE; cmd_ba = a_bank; go_wait = 1'b1;
              cmd_wait = WCW'(T_RP); cmd_next = S_READY;
            end
          end else begin
            cmd = CMD_ACT; cmd_ba = a_bank; cmd_addr = a_row; go_wait = 1'b1;
            cmd_wait = WCW'(T_RCD); cmd_next = S_READY;
          end
        end
      end
      S_WAIT: ;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_INIT_WAIT;
      state_after <= S_READY;
      wait_cnt    <= WCW'(INIT_WAIT);
      row_open    <= '0;
      open_row    <= '{default: '0};
      ref_cnt     <= '0;
      ref_pending <= 1'b0;
      wr_recover  <= '0;
      rd_pipe     <= '0;
      init_done   <= 1'b0;
      sd_cs_n     <= 1'b0;
      sd_ras_n    <= 1'b1;
      sd_cas_n    <= 1'b1;
      sd_we_n     <= 1'b1;
      sd_ba       <= '0;
      sd_addr     <= '0;
      sd_dq_out   <= '0;
      sd_dq_oe    <= 1'b0;
      rd_valid    <= 1'b0;
      rd_data     <= '0;
      refresh_tick <= 1'b0;
    end else begin
      // SDRAM_SG: registered pins
      {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= cmd;
      sd_ba     <= cmd_ba;
      sd_addr   <= cmd_addr;
      sd_dq_oe  <= cmd_wr_data;
      if (cmd_wr_data) sd_dq_out <= req_wdata;
      refresh_tick <= (cmd == CMD_REF) && init_done;

      if (cmd == CMD_MRS) init_done <= 1'b1;

      // DATA PATH: read capture
      rd_pipe  <= {rd_pipe[CL:0], (cmd == CMD_READ)};
      rd_valid <= rd_pipe[CL];
      if (rd_pipe[CL]) rd_data <= sd_dq_in;

      // write recovery before precharge
      if (cmd == CMD_WRITE)    wr_recover <= 4'(T_WR);
      else if (wr_recover != 0) wr_recover <= wr_recover - 1'b1;

      // refresh control
      if (!init_done) begin
        ref_cnt <= '0;
      end else if (cmd == CMD_REF) begin
        ref_pending <= 1'b0;
      end else if (ref_cnt >= 16'(REF_INTERVAL - 1)) begin
        ref_cnt     <= '0;
        ref_pending <= 1'b1;
      end else begin
        ref_cnt <= ref_cnt + 1'b1;
      end

      // open-row bookkeeping
      if (cmd == CMD_ACT) begin
        row_open[cmd_ba] <= 1'b1;
        open_row[cmd_ba] <= cmd_addr;
      end else if (cmd == CMD_PRE) begin
        if (cmd_addr[10]) row_open <= '0;
        else              row_open[cmd_ba] <= 1'b0;
      end

      // sequencing
      if (state == S_INIT_WAIT && wait_cnt != 0) begin
        wait_cnt <= wait_cnt - 1'b1;
      end else if (state == S_WAIT) begin
        if (wait_cnt <= 1) state <= state_after;
        else               wait_cnt <= wait_cnt - 1'b1;
      end else if (go_wait) begin
        if (cmd_wait <= 1) begin
          state <= cmd_next;
        end else begin
          state       <= S_WAIT;
          state_after <= cmd_next;
          wait_cnt    <= cmd_wait - 1'b1;
        end
      end
    end
  end

endmodule
