// fem_input_stage: 32-bit input stage of the FEM.
//
// On a 32-bit processor bus the FEM receives a call as four words, and this
// stage assembles them into one packet record (so the FEM then takes one call
// every four cycles, 32 bits per clock). Word order of a call:
//   word 0: source IP
//   word 1: destination IP
//   word 2: {source port[31:16], destination port[15:0]}
//   word 3: {op[31] (0 update, 1 estimate), 15'b0, fs_id[15:8], 2'b0, flags[5:0]}
// Words 0-2 go into a staging register; word 3 moves the whole call into the
// output register, so the next call's words can arrive while the FEM still
// holds the previous one. The published design states only that the input stage was
// narrowed to 32 bits per cycle; the word layout and the handshake are this
// design's choice.
//
// Timing: word_valid/word_ready and rec_valid/rec_ready are valid/ready
// handshakes (transfer when both are high). rec_valid rises the cycle after
// word 3 is accepted. Throughput one word per cycle.
module fem_input_stage
  import fem_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        word_valid,
  output logic        word_ready,
  input  logic [31:0] word_data,
  output logic        rec_valid,
  input  logic        rec_ready,
  output fem_op_e     rec_op,
  output pkt_key_t    rec_key,
  output flags_t      rec_flags,
  output logic [7:0]  rec_fs_id
);

  logic [1:0]  cnt;
  logic [31:0] w0, w1, w2;
  logic        take;

  // the last word of a call must wait while the previous call is still held
  assign word_ready = !(cnt == 2'd3 && rec_valid && !rec_ready);
  assign take       = word_valid && word_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      rec_valid <= 1'b0;
    end else begin
      if (rec_valid && rec_ready) rec_valid <= 1'b0;
      if (take) begin
        cnt <= cnt + 2'd1;
        if (cnt == 2'd3) rec_valid <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      case (cnt)
        2'd0: w0 <= word_data;
        2'd1: w1 <= word_data;
        2'd2: w2 <= word_data;
        default: begin
          rec_key   <= '{src_ip: w0, dst_ip: w1, src_port: w2[31:16], dst_port: w2[15:0]};
          rec_op    <= fem_op_e'(word_data[31]);
          rec_fs_id <= word_data[15:8];
          rec_flags <= word_data[FLAG_W-1:0];
        end
      endcase
    end
  end

  // a held call stays stable until taken
  property p_hold;
    @(posedge clk) disable iff (!rst_n) rec_valid && !rec_ready |=> rec_valid && $stable(rec_key);
  endproperty
  a_hold: assert property (p_hold);

endmodule
