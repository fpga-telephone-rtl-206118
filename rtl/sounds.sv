// sounds: the telephone's call-progress tones.
//
// A 64-entry sine table stepped once per 48 kHz audio sample gives exactly
// 750 Hz; stepping a second phase every other sample gives 375 Hz (the
// "400 Hz" tone). Only a quarter wave of 16 values is stored,
// round(127*sin(2*pi*(i+0.5)/64)) for i = 0..15, and mirrored by the two top
// phase bits. A cadence counter flips every CADENCE_SAMPLES samples and is
// restarted whenever the state changes. tone_out, updated on each ready, is
// what the speaker plays in the tone-producing states:
//   IDLE     750 Hz continuously
//   CALLING  750 Hz alternating with silence
//   RINGING  750 Hz alternating with 375 Hz
//   others   silence
// beep is the plain 750 Hz tone, used to append the end-of-greeting beep.
// Samples are signed 8-bit. The tones, their frequencies and their use per
// state follow the description; the table form and the half-second cadence are
// this design's own choices.
module sounds
  import phone_pkg::*;
#(
  parameter int unsigned CADENCE_SAMPLES = 24_000
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ready,
  input  phone_state_t state,
  output logic [7:0]   tone_out,
  output logic [7:0]   beep
);
  localparam int CW = $clog2(CADENCE_SAMPLES + 1);

  logic [5:0]    ph750, ph375;
  logic          half;
  logic [CW-1:0] cad_cnt;
  logic          cad_on;
  phone_state_t  prev_state;

  function automatic logic [7:0] quarter(input logic [3:0] i);
    unique case (i)
      4'd0:  return 8'd6;    4'd1:  return 8'd19;
      4'd2:  return 8'd31;   4'd3:  return 8'd43;
      4'd4:  return 8'd54;   4'd5:  return 8'd65;
      4'd6:  return 8'd76;   4'd7:  return 8'd85;
      4'd8:  return 8'd94;   4'd9:  return 8'd102;
      4'd10: return 8'd109;  4'd11: return 8'd115;
      4'd12: return 8'd120;  4'd13: return 8'd123;
      4'd14: return 8'd126;  default: return 8'd127;
    endcase
  endfunction

  function automatic logic [7:0] sine64(input logic [5:0] ph);
    logic [7:0] m;
    m = ph[4] ? quarter(~ph[3:0]) : quarter(ph[3:0]);
    return ph[5] ? (~m + 8'd1) : m;
  endfunction

  logic [7:0] s750, s375;
  assign s750 = sine64(ph750);
  assign s375 = sine64(ph375);
  assign beep = s750;

  always_ff @(posedge clk) begin
    if (rst) begin
      ph750      <= '0;
      ph375      <= '0;
      half       <= 1'b0;
      cad_cnt    <= '0;
      cad_on     <= 1'b1;
      prev_state <= S_IDLE;
      tone_out   <= '0;
    end else begin
      prev_state <= state;
      if (state != prev_state) begin
        cad_cnt <= '0;
        cad_on  <= 1'b1;
      end else if (ready) begin
        if (cad_cnt == CW'(CADENCE_SAMPLES - 1)) begin
          cad_cnt <= '0;
          cad_on  <= !cad_on;
        end else begin
          cad_cnt <= cad_cnt + 1'b1;
        end
      end
      if (ready) begin
        ph750 <= ph750 + 1'b1;
        half  <= !half;
        if (half) ph375 <= ph375 + 1'b1;
        unique case (state)
          S_IDLE:    tone_out <= s750;
          S_CALLING: tone_out <= cad_on ? s750 : 8'd0;
          S_RINGING: tone_out <= cad_on ? s750 : s375;
          default:   tone_out <= 8'd0;
        endcase
      end
    end
  end
endmodule
