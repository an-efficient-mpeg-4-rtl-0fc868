// tb_mb_scheduler: self-checking test of the MB pipeline timing at its
// default (QCIF, 30 frames/s at 27 MHz) settings over two frame periods.
// Every strobe is timed against the cycle of the last vsync: vsync every
// 900,000 cycles, encoding slot k at k*4,500 (105 slots), decoding frame
// start at 472,500 and decoding slot k at 472,500 + k*3,600 (118 slots).
// For each pipeline stage it checks that 99 MBs start per frame, in order,
// and that stage s starts MB n in slot n+s.
// A second instance runs the CIF setting (7.5 frames/s at 27 MHz: a
// 3,600,000-cycle frame, 396 MBs, 400 encoding slots from cycle 0 and 400
// decoding slots from cycle 1,800,000) for one frame with the same checks.
module tb_mb_scheduler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, vsync, enc_frame_start, dec_frame_start, enc_mb_start, dec_mb_start;
  logic [8:0] enc_slot, dec_slot; logic [4:0] frame_no;
  logic [3:0] enc_stage_start; logic [3:0][8:0] enc_stage_mb;
  logic [2:0] dec_stage_start; logic [2:0][8:0] dec_stage_mb;
  int checks = 0, failures = 0, cyc = 0, t_vs = -1, frames = 0;
  int n_enc, n_dec, n_es [4], n_ds [3];

  mb_scheduler dut (.*);

  // CIF instance
  localparam int C_FRAME = 3_600_000, C_SLOTS = 400, C_DEC = 1_800_000, C_MBS = 396;
  logic c_vsync, c_efs, c_dfs, c_ems, c_dms;
  logic [8:0] c_eslot, c_dslot; logic [4:0] c_frame_no;
  logic [3:0] c_ess; logic [3:0][8:0] c_esmb;
  logic [2:0] c_dss; logic [2:0][8:0] c_dsmb;
  int c_t_vs = -1, c_frames = 0, c_enc, c_dec, c_es [4], c_ds [3];
  mb_scheduler #(.FRAME_CYCLES(C_FRAME), .ENC_SLOTS(C_SLOTS), .DEC_OFFSET(C_DEC),
                 .DEC_SLOTS(C_SLOTS), .MB_PER_FRAME(C_MBS)) cif (
    .clk, .rst_n, .enable, .vsync(c_vsync), .enc_frame_start(c_efs), .dec_frame_start(c_dfs),
    .enc_mb_start(c_ems), .enc_slot(c_eslot), .dec_mb_start(c_dms), .dec_slot(c_dslot),
    .enc_stage_start(c_ess), .enc_stage_mb(c_esmb), .dec_stage_start(c_dss), .dec_stage_mb(c_dsmb),
    .frame_no(c_frame_no)
  );

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; if (failures < 20) $display("%s: got %0d want %0d", what, got, want); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (vsync) begin
      if (t_vs >= 0) begin
        expect_eq("frame period", cyc - t_vs, 900000);
        expect_eq("enc slots", n_enc, 105); expect_eq("dec slots", n_dec, 118);
        for (int s = 0; s < 4; s++) expect_eq("enc stage MBs", n_es[s], 99);
        for (int s = 0; s < 3; s++) expect_eq("dec stage MBs", n_ds[s], 99);
        frames++;
      end
      t_vs = cyc; n_enc = 0; n_dec = 0;
      n_es = '{default: 0}; n_ds = '{default: 0};
      expect_eq("enc frame start with vsync", int'(enc_frame_start), 1);
    end
    if (t_vs >= 0) begin
      if (dec_frame_start) expect_eq("dec frame start", cyc - t_vs, 472500);
      if (enc_mb_start) begin
        expect_eq("enc slot time", cyc - t_vs, n_enc * 4500);
        expect_eq("enc slot no", int'(enc_slot), n_enc);
        for (int s = 0; s < 4; s++) if (enc_stage_start[s]) begin
          expect_eq("enc stage mb", int'(enc_stage_mb[s]), n_es[s]);
          expect_eq("enc stage slot", n_enc - s, n_es[s]);
          n_es[s]++;
        end
        n_enc++;
      end
      if (dec_mb_start) begin
        expect_eq("dec slot time", cyc - t_vs, 472500 + n_dec * 3600);
        for (int s = 0; s < 3; s++) if (dec_stage_start[s]) begin
          expect_eq("dec stage mb", int'(dec_stage_mb[s]), n_ds[s]);
          expect_eq("dec stage slot", n_dec - s, n_ds[s]);
          n_ds[s]++;
        end
        n_dec++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (c_vsync) begin
      if (c_t_vs >= 0) begin
        expect_eq("CIF frame period", cyc - c_t_vs, C_FRAME);
        expect_eq("CIF enc slots", c_enc, C_SLOTS); expect_eq("CIF dec slots", c_dec, C_SLOTS);
        for (int s = 0; s < 4; s++) expect_eq("CIF enc stage MBs", c_es[s], C_MBS);
        for (int s = 0; s < 3; s++) expect_eq("CIF dec stage MBs", c_ds[s], C_MBS);
        c_frames++;
      end
      c_t_vs = cyc; c_enc = 0; c_dec = 0;
      c_es = '{default: 0}; c_ds = '{default: 0};
    end
    if (c_t_vs >= 0) begin
      if (c_dfs) expect_eq("CIF dec frame start", cyc - c_t_vs, C_DEC);
      if (c_ems) begin
        expect_eq("CIF enc slot time", cyc - c_t_vs, c_enc * 4500);
        expect_eq("CIF enc slot no", int'(c_eslot), c_enc);
        for (int s = 0; s < 4; s++) if (c_ess[s]) begin
          expect_eq("CIF enc stage mb", int'(c_esmb[s]), c_es[s]);
          expect_eq("CIF enc stage slot", c_enc - s, c_es[s]);
          c_es[s]++;
        end
        c_enc++;
      end
      if (c_dms) begin
        expect_eq("CIF dec slot time", cyc - c_t_vs, C_DEC + c_dec * 3600);
        expect_eq("CIF dec slot no", int'(c_dslot), c_dec);
        for (int s = 0; s < 3; s++) if (c_dss[s]) begin
          expect_eq("CIF dec stage mb", int'(c_dsmb[s]), c_ds[s]);
          c_ds[s]++;
        end
        c_dec++;
      end
    end
  end

  initial begin
    enable = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); enable = 1;
    wait (frames == 2);
    expect_eq("frame number", int'(frame_no), 2);
    wait (c_frames == 1);
    expect_eq("CIF frame number", int'(c_frame_no), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
