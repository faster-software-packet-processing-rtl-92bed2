// Packet splitter: copies the first CHUNK_BYTES of every packet into the
// Warp Engine pipeline while the whole packet goes on to the packet data path.
//
// Packets arrive as 64B beats (tdata/tkeep/tlast with valid/ready). Every
// accepted beat is handed, unchanged and in the same cycle, to the packet
// data path (pd_*). A copy of the beat is also registered (input stage) and
// then gathered into the chunk register: the first two beats of a packet
// fill bytes 0..63 and 64..127. The chunk is emitted, for one enabled cycle,
// when the beat that completes it (the second beat, or the last beat of a
// shorter packet) leaves the input stage. Bytes not covered by the packet
// (tkeep low or packet shorter than the chunk) read as zero.
//
// Timing: the chunk is valid at the output two enabled cycles after the
// beat that completes it is accepted. The whole engine advances on one
// enable (en); beats are only accepted when en is high and the data path
// can take them (pd_ready).
//
// The splitter and the 128B chunk follow the design; the two-register
// structure, the zero fill and the handshake are this implementation's own.
module pkt_splitter
  import warp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  // packet input (receive queue)
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [BEAT_W-1:0]     in_data,
  input  logic [BEAT_BYTES-1:0] in_keep,
  input  logic                  in_last,
  // packet data path
  output logic                  pd_valid,
  input  logic                  pd_ready,
  output logic [BEAT_W-1:0]     pd_data,
  output logic [BEAT_BYTES-1:0] pd_keep,
  output logic                  pd_last,
  // packet chunk to the key extractor
  output logic                  chunk_valid,
  output logic [CHUNK_W-1:0]    chunk
);

  localparam int unsigned BEATS_PER_CHUNK = CHUNK_BYTES / BEAT_BYTES;

  logic accept;
  assign in_ready = en && pd_ready;
  assign accept   = in_valid && in_ready;

  assign pd_valid = in_valid && en;
  assign pd_data  = in_data;
  assign pd_keep  = in_keep;
  assign pd_last  = in_last;

  // beat index inside the current packet, saturating past the chunk
  logic [$clog2(BEATS_PER_CHUNK+1)-1:0] beat_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) beat_idx <= '0;
    else if (accept) begin
      if (in_last) beat_idx <= '0;
      else if (beat_idx != BEATS_PER_CHUNK[$bits(beat_idx)-1:0]) beat_idx <= beat_idx + 1'b1;
    end
  end

  // input stage: masked beat, its position and whether it completes a chunk
  logic                              a_valid;
  logic [BEAT_W-1:0]                 a_data;
  logic [$clog2(BEATS_PER_CHUNK)-1:0] a_pos;
  logic                              a_done;

  logic [BEAT_W-1:0] masked;
  always_comb begin
    for (int b = 0; b < BEAT_BYTES; b++)
      masked[8*b +: 8] = in_keep[b] ? in_data[8*b +: 8] : 8'h00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      a_data  <= '0;
      a_pos   <= '0;
      a_done  <= 1'b0;
    end else if (en) begin
      a_valid <= accept && (int'(beat_idx) < BEATS_PER_CHUNK);
      a_data  <= masked;
      a_pos   <= beat_idx[$clog2(BEATS_PER_CHUNK)-1:0];
      a_done  <= in_last || (int'(beat_idx) == BEATS_PER_CHUNK - 1);
    end
  end

  // chunk assembly stage
  logic [CHUNK_W-1:0] acc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc         <= '0;
      chunk       <= '0;
      chunk_valid <= 1'b0;
    end else if (en) begin
      chunk_valid <= 1'b0;
      if (a_valid) begin
        if (a_done) begin
          chunk_valid <= 1'b1;
          for (int p = 0; p < BEATS_PER_CHUNK; p++) begin
            if (p == int'(a_pos))     chunk[BEAT_W*p +: BEAT_W] <= a_data;
            else if (p < int'(a_pos)) chunk[BEAT_W*p +: BEAT_W] <= acc[BEAT_W*p +: BEAT_W];
            else                      chunk[BEAT_W*p +: BEAT_W] <= '0;
          end
          acc <= '0;
        end else begin
          acc[BEAT_W*a_pos +: BEAT_W] <= a_data;
        end
      end
    end
  end

endmodule
