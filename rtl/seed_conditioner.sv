// Conditioning stage: whitens the raw sensor bitstream with SHA-512 and forms a key.
//
// On key_req_i the block gathers MSG_BLOCKS x 1024 raw bits, packing them most significant
// bit first (the first raw bit becomes bit 7 of message byte 0), hashes each full block,
// then hashes the standard SHA-512 padding block (a single 1 bit, zeros, and the 128-bit
// message length). The message is a whole number of blocks, so the padding always fills
// a block of its own. The 512-bit digest is cut into the key:
//     gamma = digest[511:448], x0 = digest[447:384], y0 = digest[383:323]
// (189 of the 512 bits). The document hashes the raw bitstream and uses part of the
// result as gamma, x0 and y0; the message length and the bit assignment are this
// design's choices.
//
// Interface: raw_ready_o is high while bits are being gathered; a raw bit is taken on each
// cycle with raw_valid_i && raw_ready_o. key_valid_o pulses for one cycle with key_o once
// the last block is hashed; key_o holds until the next key. busy_o is high from key_req_i
// until key_valid_o. A request while busy is ignored.
module seed_conditioner
  import stm_cipher_pkg::*;
#(
  parameter int unsigned MSG_BLOCKS = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  key_req_i,
  input  logic  raw_valid_i,
  input  logic  raw_i,
  output logic  raw_ready_o,
  output logic  busy_o,
  output logic  key_valid_o,
  output seed_t key_o,
  output logic  block_hashed_o   // pulses when SHA-512 finishes any block
);

  localparam int unsigned   BLK_W    = 1024;
  localparam logic [127:0]  MSG_BITS = 128'(BLK_W * MSG_BLOCKS);
  localparam int unsigned   NBLK_W   = $clog2(MSG_BLOCKS + 2);

  typedef enum logic [2:0] {S_IDLE, S_COLLECT, S_HASH, S_WAIT, S_PAD, S_PAD_WAIT} state_e;

  state_e                state_q;
  logic [BLK_W-1:0]      buf_q;
  logic [10:0]           nbits_q;
  logic [NBLK_W-1:0]     nblk_q;   // message blocks already hashed
  logic                  sha_start, sha_first, sha_ready, sha_done;
  logic [BLK_W-1:0]      sha_block;
  logic [511:0]          digest;
  seed_t                 key_q;
  logic                  key_valid_q;

  always_comb begin
    sha_start = 1'b0;
    sha_first = 1'b0;
    sha_block = buf_q;
    unique case (state_q)
      S_HASH: begin
        sha_start = sha_ready;
        sha_first = (nblk_q == '0);
      end
      S_PAD: begin
        sha_start = sha_ready;
        sha_block = {1'b1, {(BLK_W-129){1'b0}}, MSG_BITS};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      buf_q       <= '0;
      nbits_q     <= '0;
      nblk_q      <= '0;
      key_q       <= '0;
      key_valid_q <= 1'b0;
    end else begin
      key_valid_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (key_req_i) begin
          nbits_q <= '0;
          nblk_q  <= '0;
          state_q <= S_COLLECT;
        end
        S_COLLECT: if (raw_valid_i) begin
          buf_q   <= {buf_q[BLK_W-2:0], raw_i};
          nbits_q <= nbits_q + 1'b1;
          if (nbits_q == 11'(BLK_W - 1)) state_q <= S_HASH;
        end
        S_HASH: if (sha_ready) state_q <= S_WAIT;
        S_WAIT: if (sha_done) begin
          nblk_q  <= nblk_q + 1'b1;
          nbits_q <= '0;
          state_q <= (nblk_q == NBLK_W'(MSG_BLOCKS - 1)) ? S_PAD : S_COLLECT;
        end
        S_PAD: if (sha_ready) state_q <= S_PAD_WAIT;
        S_PAD_WAIT: if (sha_done) begin
          key_q.gamma <= digest[511:448];
          key_q.x0    <= digest[447:384];
          key_q.y0    <= digest[383:383-LFSR_N+1];
          key_valid_q <= 1'b1;
          state_q     <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  sha512_core u_sha (
    .clk, .rst_n,
    .start_i (sha_start),
    .first_i (sha_first),
    .block_i (sha_block),
    .ready_o (sha_ready),
    .done_o  (sha_done),
    .digest_o(digest)
  );

  assign raw_ready_o    = (state_q == S_COLLECT);
  assign busy_o         = (state_q != S_IDLE);
  assign key_valid_o    = key_valid_q;
  assign key_o          = key_q;
  assign block_hashed_o = sha_done;

endmodule
