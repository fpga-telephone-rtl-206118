// voice_memory: greeting and message slots in the external ZBT SRAM.
//
// The SRAM is split into NUM_MSG+1 slots of 2**SLOT_AW words: slot 0 holds the
// recorded greeting, slots 1..NUM_MSG the voice messages. A word holds one
// 8-bit audio sample (6 kHz) in its low byte; the address is {slot, offset}.
// Each slot has a length register, so playback stops where the recording did.
//
// Recording: rec_start selects a slot and empties it; every wr_valid writes
// one sample at the next offset and grows the slot's length, until the slot
// is full (full stays high and further samples are dropped).
// Playback: play_start selects a slot and rewinds; every rd_req fetches the
// next recorded sample. The SRAM command is registered and the SRAM returns
// data READ_LATENCY cycles after it sees the address, so rd_valid comes
// READ_LATENCY+1 cycles after rd_req. play_done is high once every recorded
// sample has been requested and returned.
// READ_LATENCY must be at least 1. Write data goes out in the same cycle as its address; a pipelined ZBT that
// wants write data later needs that delay added at the pins.
// Two message slots and the use of the ZBT follow the description; slot size,
// address layout and the sample-per-word packing are this design's choices.
module voice_memory #(
  parameter int unsigned NUM_MSG      = 2,
  parameter int unsigned SLOT_AW      = 16,
  parameter int unsigned ADDR_W       = 19,
  parameter int unsigned DATA_W       = 36,
  parameter int unsigned READ_LATENCY = 2,
  localparam int unsigned SLOT_W      = $clog2(NUM_MSG + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              rec_start,
  input  logic              play_start,
  input  logic [SLOT_W-1:0] slot,
  input  logic              wr_valid,
  input  logic [7:0]        wr_data,
  input  logic              rd_req,
  output logic              rd_valid,
  output logic [7:0]        rd_data,
  output logic              full,
  output logic              play_done,
  output logic [ADDR_W-1:0] zbt_addr,
  output logic              zbt_we,
  output logic [DATA_W-1:0] zbt_wdata,
  input  logic [DATA_W-1:0] zbt_rdata
);
  localparam int unsigned NSLOTS = NUM_MSG + 1;
  localparam int unsigned LW     = SLOT_AW + 1;
  localparam int unsigned PIPE   = READ_LATENCY + 1;

  typedef enum logic [1:0] {M_NONE, M_REC, M_PLAY} mode_t;

  mode_t             mode;
  logic [SLOT_W-1:0] cur;
  logic [LW-1:0]     len [NSLOTS];
  logic [LW-1:0]     wptr, rptr;
  logic [PIPE-1:0]   inflight;
  logic              do_wr, do_rd;

  assign full      = (mode == M_REC) && (wptr == LW'(2 ** SLOT_AW));
  assign do_wr     = (mode == M_REC) && wr_valid && !full && !rec_start && !play_start;
  assign do_rd     = (mode == M_PLAY) && rd_req && (rptr < len[cur]) && !rec_start && !play_start;
  assign play_done = (mode == M_PLAY) && (rptr >= len[cur]) && (inflight == '0);
  assign rd_valid  = inflight[PIPE-1];
  assign rd_data   = zbt_rdata[7:0];

  function automatic logic [ADDR_W-1:0] slot_addr(input logic [SLOT_W-1:0] s,
                                                   input logic [LW-1:0] off);
    return ADDR_W'({s, off[SLOT_AW-1:0]});
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      mode      <= M_NONE;
      cur       <= '0;
      wptr      <= '0;
      rptr      <= '0;
      inflight  <= '0;
      zbt_addr  <= '0;
      zbt_we    <= 1'b0;
      zbt_wdata <= '0;
      for (int i = 0; i < NSLOTS; i++) len[i] <= '0;
    end else begin
      zbt_we   <= 1'b0;
      inflight <= {inflight[PIPE-2:0], do_rd};
      if (rec_start) begin
        mode      <= M_REC;
        cur       <= slot;
        wptr      <= '0;
        len[slot] <= '0;
      end else if (play_start) begin
        mode <= M_PLAY;
        cur  <= slot;
        rptr <= '0;
      end else if (do_wr) begin
        zbt_addr  <= slot_addr(cur, wptr);
        zbt_we    <= 1'b1;
        zbt_wdata <= DATA_W'(wr_data);
        wptr      <= wptr + 1'b1;
        len[cur]  <= wptr + 1'b1;
      end else if (do_rd) begin
        zbt_addr <= slot_addr(cur, rptr);
        rptr     <= rptr + 1'b1;
      end
    end
  end

  a_slot_in_range: assert property (@(posedge clk) disable iff (rst)
    (rec_start || play_start) |-> (slot < SLOT_W'(NSLOTS)));
endmodule
