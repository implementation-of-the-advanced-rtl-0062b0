// aes_key_expand: the AES-128 key generator.
//
// On a start pulse it loads the 128-bit key as round key 0, then makes one
// round key per clock: the last word of the previous round key is rotated by
// one byte (RotWord), passed through four S-boxes (SubWord) and XORed with
// the round constant; the four new words are the running XOR of that value
// with the previous key's words. After NR = 10 steps all eleven round keys
// are held in registers and ready rises; they stay valid until the next
// start. Latency: the clock edge that samples start loads round key 0, the
// next ten edges write round keys 1..10, and the tenth of them also sets
// ready, so ready is high 11 cycles after the start cycle.
// The expansion rule is the AES-128 key schedule the design uses; generating
// the keys sequentially and storing all eleven is this design's choice, made
// so that the decryption core can use them in reverse order.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  block_t      key,
  output logic        ready,
  output round_keys_t round_keys
);

  logic [3:0] step;      // index of the round key being generated
  logic       running;
  block_t     prev;
  word_t      last_col, rot_col, sub_col, temp;
  block_t     next_key;

  assign prev     = round_keys[step - 4'd1];
  assign last_col = prev[31:0];
  assign rot_col  = {last_col[23:0], last_col[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox #(.INVERSE(1'b0)) u_sbox (.in_byte(rot_col[31 - 8*b -: 8]), .out_byte(sub_col[31 - 8*b -: 8]));
  end

  always_comb begin
    word_t w0, w1, w2, w3;
    temp     = sub_col ^ {rcon(int'(step)), 24'h0};
    w0       = prev[127:96] ^ temp;
    w1       = prev[95:64]  ^ w0;
    w2       = prev[63:32]  ^ w1;
    w3       = prev[31:0]   ^ w2;
    next_key = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running    <= 1'b0;
      ready      <= 1'b0;
      step       <= 4'd1;
      round_keys <= '0;
    end else if (start) begin
      round_keys[0] <= key;
      step          <= 4'd1;
      running       <= 1'b1;
      ready         <= 1'b0;
    end else if (running) begin
      round_keys[step] <= next_key;
      if (step == 4'(NR)) begin
        running <= 1'b0;
        ready   <= 1'b1;
      end else begin
        step <= step + 4'd1;
      end
    end
  end

endmodule
