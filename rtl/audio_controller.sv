// audio_controller: decides what the speaker says and streams it from the SD card into the
// audio FIFO.
//
// Requests. `sound_req` asks for one of the stored sounds (`sound_id`: boot jingle, beep,
// "system error"); `announce_req` asks for the heart rate `announce_hr` to be spoken. An
// announcement is a sequence of words built by audio_number_map ("eighty", "three", "beats
// per minute"). While an announcement is running, audio playback is locked out: beep requests
// are dropped (`beep_dropped` pulses), so a beep never splits a sentence. Any other request
// that arrives while the controller is busy waits in a one-deep pending slot (a newer one
// replaces it); a pending announcement is served before a pending sound.
//
// Streaming. A sound is a range of 512-byte SD blocks. For each block the controller waits
// until the FIFO has room for a whole block (fifo_count <= 4096 - 512) and the card reader is
// ready, then pulses `sd_rd` with the block address. The reader answers with 512
// `sd_byte_available` strobes, each with a byte on `sd_dout`, which go straight into the FIFO.
// After the last block of a word the next word of an announcement follows without a gap.
// Block addresses are multiples of 512, so the low bits of `sd_address` are always zero; the
// full byte address is kept because that is what the reader takes.
//
// The lockout, the FIFO between card and speaker, the block-aligned addresses, the word
// sequence and the 12-bit fill count follow the document. The SD reader's handshake (one-cycle
// `sd_rd` while `sd_ready`, one strobe per byte, `sd_ready` low while busy), the pending slot and
// the dropping of beeps are this design's reading of it.
module audio_controller
  import heartaware_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4096
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sound_req,
  input  sound_t               sound_id,
  input  logic                 announce_req,
  input  logic [7:0]           announce_hr,
  input  logic                 sd_ready,
  output logic                 sd_rd,
  output logic [SD_ADDR_W-1:0] sd_address,
  input  logic [7:0]           sd_dout,
  input  logic                 sd_byte_available,
  output logic                 fifo_wr_en,
  output logic [7:0]           fifo_din,
  input  logic [11:0]          fifo_count,
  output logic                 busy,
  output logic                 announcing,
  output logic                 beep_dropped
);
  typedef enum logic [2:0] {
    A_IDLE, A_WORD, A_WAIT_SPACE, A_WAIT_ACCEPT, A_READ
  } astate_t;

  astate_t              state;
  logic [7:0]           number;
  logic                 last_word;
  logic [SD_ADDR_W-1:0] addr, end_addr;
  logic [9:0]           bytes;
  logic                 pend_sound, pend_announce;
  sound_t               pend_id;
  logic [7:0]           pend_hr;

  clip_t      word_clip;
  logic [7:0] word_rem;
  logic       word_last;
  audio_number_map u_map (.number, .clip(word_clip), .remaining(word_rem), .last(word_last));

  function automatic clip_t sound_clip(input sound_t id);
    case (id)
      SND_JINGLE: return slot_clip(SLOT_JINGLE, 7);
      SND_SYSERR: return slot_clip(SLOT_SYSERR, 2);
      default:    return slot_clip(SLOT_BEEP, 1);
    endcase
  endfunction

  assign busy       = (state != A_IDLE);
  assign fifo_din   = sd_dout;
  assign fifo_wr_en = (state == A_READ) && sd_byte_available;

  localparam int unsigned SD_BLOCK_BYTES = 512;
  logic space_ok;
  assign space_ok = (fifo_count <= 12'(FIFO_DEPTH - SD_BLOCK_BYTES));

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= A_IDLE;
      number        <= '0;
      last_word     <= 1'b0;
      addr          <= '0;
      end_addr      <= '0;
      bytes         <= '0;
      pend_sound    <= 1'b0;
      pend_announce <= 1'b0;
      pend_id       <= SND_BEEP;
      pend_hr       <= '0;
      announcing    <= 1'b0;
      sd_rd         <= 1'b0;
      sd_address    <= '0;
      beep_dropped  <= 1'b0;
    end else begin
      sd_rd        <= 1'b0;
      beep_dropped <= 1'b0;

      // Collect requests.
      if (announce_req && !announcing) begin
        pend_announce <= 1'b1;
        pend_hr       <= announce_hr;
      end
      if (sound_req) begin
        if (sound_id == SND_BEEP && (announcing || pend_announce || announce_req)) begin
          beep_dropped <= 1'b1;
        end else begin
          pend_sound <= 1'b1;
          pend_id    <= sound_id;
        end
      end

      unique case (state)
        A_IDLE: begin
          if (pend_announce) begin
            pend_announce <= 1'b0;
            announcing    <= 1'b1;
            number        <= pend_hr;
            state         <= A_WORD;
          end else if (pend_sound && !sound_req) begin
            pend_sound <= 1'b0;
            addr       <= sound_clip(pend_id).start_addr;
            end_addr   <= sound_clip(pend_id).end_addr;
            last_word  <= 1'b1;
            state      <= A_WAIT_SPACE;
          end
        end
        A_WORD: begin
          addr      <= word_clip.start_addr;
          end_addr  <= word_clip.end_addr;
          last_word <= word_last;
          number    <= word_rem;
          state     <= A_WAIT_SPACE;
        end
        A_WAIT_SPACE: begin
          if (space_ok && sd_ready) begin
            sd_rd      <= 1'b1;
            sd_address <= addr;
            bytes      <= '0;
            state      <= A_WAIT_ACCEPT;
          end
        end
        A_WAIT_ACCEPT: begin
          // The reader drops `sd_ready` once it has taken the request.
          if (!sd_ready) state <= A_READ;
        end
        A_READ: begin
          if (sd_byte_available) begin
            bytes <= bytes + 10'd1;
            if (bytes == 10'(SD_BLOCK_BYTES - 1)) begin
              addr <= addr + SD_ADDR_W'(SD_BLOCK_BYTES);
              if (addr + SD_ADDR_W'(SD_BLOCK_BYTES) < end_addr) begin
                state <= A_WAIT_SPACE;
              end else if (announcing && !last_word) begin
                state <= A_WORD;
              end else begin
                announcing <= 1'b0;
                state      <= A_IDLE;
              end
            end
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst)
                   sd_byte_available |-> (state == A_READ))
    else $error("audio_controller: SD byte arrived with no block requested");
endmodule
