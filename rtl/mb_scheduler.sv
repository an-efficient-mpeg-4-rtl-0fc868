// mb_scheduler: fixed time-slot timing of the macroblock (MB) pipeline.
//
// All blocks of the codec work on MBs in lock step, so a single counter
// decides when each pipeline stage starts; no SDRAM or bus arbitration
// between stages is needed. Per frame period of FRAME_CYCLES clocks
// (900,000 = 27 MHz / 30 frames/s):
//  - cycle 0: vsync and the encoding frame start, followed by ENC_SLOTS
//    encoding slots of ENC_MB_CYCLES (105 x 4,500 = 472,500 cycles);
//  - cycle DEC_OFFSET (472,500): the decoding frame start, followed by
//    DEC_SLOTS decoding slots of DEC_MB_CYCLES (118 x 3,600 = 424,800 cycles),
//    which end within the remaining 427,500 cycles.
// Each slot start pulses enc_mb_start / dec_mb_start with the slot number.
// The encoder is a 4-stage pipeline (MEC; MEF/MC; DCTQ/IDCTQ; REC/SP) and the
// decoder a 3-stage one (VLD; MC,IQ/IDCT; REC/DB): in slot k, stage s works
// on MB k-s. enc_stage_start[s] pulses at the slot start when that MB exists
// (0 <= k-s < MB_PER_FRAME), with its MB number in enc_stage_mb[s]; the same
// holds for the decoder. Slots with no stage active are left to the firmware.
// The periods, slot counts and stage names follow the document's timing
// chart and pipeline figures; starting the decoding slots right at the
// decoding frame start and the MB-per-frame default (99, QCIF) are this
// design's own reading.
module mb_scheduler #(
  parameter int unsigned FRAME_CYCLES  = 900_000,
  parameter int unsigned ENC_MB_CYCLES = 4_500,
  parameter int unsigned ENC_SLOTS     = 105,
  parameter int unsigned DEC_OFFSET    = 472_500,
  parameter int unsigned DEC_MB_CYCLES = 3_600,
  parameter int unsigned DEC_SLOTS     = 118,
  parameter int unsigned MB_PER_FRAME  = 99,
  parameter int unsigned ENC_STAGES    = 4,
  parameter int unsigned DEC_STAGES    = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  output logic                  vsync,
  output logic                  enc_frame_start,
  output logic                  dec_frame_start,
  output logic                  enc_mb_start,
  output logic [8:0]            enc_slot,
  output logic                  dec_mb_start,
  output logic [8:0]            dec_slot,
  output logic [ENC_STAGES-1:0] enc_stage_start,
  output logic [ENC_STAGES-1:0][8:0] enc_stage_mb,
  output logic [DEC_STAGES-1:0] dec_stage_start,
  output logic [DEC_STAGES-1:0][8:0] dec_stage_mb,
  output logic [4:0]            frame_no
);
  localparam int unsigned FW = $clog2(FRAME_CYCLES);
  localparam int unsigned SW = $clog2(ENC_MB_CYCLES > DEC_MB_CYCLES ? ENC_MB_CYCLES : DEC_MB_CYCLES);

  logic [FW-1:0] fcnt;             // cycle within the frame period
  logic [SW-1:0] enc_cnt, dec_cnt; // cycle within the current slot
  logic [8:0]    enc_k, dec_k;     // next slot number
  logic          enc_run, dec_run;

  logic enc_fire, dec_fire;
  assign enc_fire = enable && ((fcnt == 0) || (enc_run && enc_cnt == SW'(ENC_MB_CYCLES - 1) && enc_k < 9'(ENC_SLOTS)));
  assign dec_fire = enable && ((fcnt == FW'(DEC_OFFSET)) || (dec_run && dec_cnt == SW'(DEC_MB_CYCLES - 1) && dec_k < 9'(DEC_SLOTS)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcnt <= '0; enc_cnt <= '0; dec_cnt <= '0; enc_k <= '0; dec_k <= '0;
      enc_run <= 1'b0; dec_run <= 1'b0; frame_no <= '0;
      vsync <= 1'b0; enc_frame_start <= 1'b0; dec_frame_start <= 1'b0;
      enc_mb_start <= 1'b0; dec_mb_start <= 1'b0; enc_slot <= '0; dec_slot <= '0;
      enc_stage_start <= '0; dec_stage_start <= '0; enc_stage_mb <= '0; dec_stage_mb <= '0;
    end else if (enable) begin
      fcnt <= (fcnt == FW'(FRAME_CYCLES - 1)) ? '0 : fcnt + 1'b1;
      if (fcnt == FW'(FRAME_CYCLES - 1)) frame_no <= (frame_no == 5'd29) ? '0 : frame_no + 1'b1;

      vsync           <= (fcnt == 0);
      enc_frame_start <= (fcnt == 0);
      dec_frame_start <= (fcnt == FW'(DEC_OFFSET));

      // encoding slots
      enc_mb_start    <= enc_fire;
      enc_stage_start <= '0;
      if (enc_fire) begin
        automatic logic [8:0] k = (fcnt == 0) ? 9'd0 : enc_k;
        enc_slot <= k;
        enc_k    <= k + 1'b1;
        enc_cnt  <= '0;
        enc_run  <= 1'b1;
        for (int s = 0; s < ENC_STAGES; s++) begin
          enc_stage_mb[s]    <= 9'(k) - 9'(s);
          enc_stage_start[s] <= (int'(k) >= s) && (int'(k) - s < int'(MB_PER_FRAME));
        end
      end else if (enc_run) begin
        if (enc_cnt == SW'(ENC_MB_CYCLES - 1)) enc_run <= 1'b0;
        else enc_cnt <= enc_cnt + 1'b1;
      end

      // decoding slots
      dec_mb_start    <= dec_fire;
      dec_stage_start <= '0;
      if (dec_fire) begin
        automatic logic [8:0] k = (fcnt == FW'(DEC_OFFSET)) ? 9'd0 : dec_k;
        dec_slot <= k;
        dec_k    <= k + 1'b1;
        dec_cnt  <= '0;
        dec_run  <= 1'b1;
        for (int s = 0; s < DEC_STAGES; s++) begin
          dec_stage_mb[s]    <= 9'(k) - 9'(s);
          dec_stage_start[s] <= (int'(k) >= s) && (int'(k) - s < int'(MB_PER_FRAME));
        end
      end else if (dec_run) begin
        if (dec_cnt == SW'(DEC_MB_CYCLES - 1)) dec_run <= 1'b0;
        else dec_cnt <= dec_cnt + 1'b1;
      end
    end
  end

  // the decoding period must fit into the frame after the encoding period
  initial begin
    assert (ENC_SLOTS * ENC_MB_CYCLES <= DEC_OFFSET) else $error("encoding slots overrun the decoding start");
    assert (DEC_OFFSET + DEC_SLOTS * DEC_MB_CYCLES <= FRAME_CYCLES) else $error("decoding slots overrun the frame");
  end
endmodule
