// butterfly_puf: behavioural model of the 16-bit butterfly PUF (BPUF), the
// weak PUF that supplies the KEY. A butterfly cell is two cross-coupled
// latches (L1, L2) whose preset and clear inputs are held by the excite
// signal; on release the pair falls into one of its two stable states, and
// which one depends on the mismatch of the two paths. That is analog
// behaviour, so this file is a model, not synthesizable logic.
//
// Model. Each cell settles to its bit of STABLE_KEY, except the cells named
// in UNSTABLE_MASK, which settle at random on every excitation. The default
// values reproduce the key population that the document's enrolment charts
// print for its two chips: 16 keys CF6F..FFFF, that is all ones except four
// cells (bits 13, 12, 7, 4) that vary from run to run.
//
// Interface and timing: `excite` held high for one clock presets all cells;
// SETTLE clocks after it falls, `key` is updated and `valid` is high for one
// clock. The settling time and the handshake are this model's choices.
module butterfly_puf #(
  parameter int unsigned N             = 16,
  parameter logic [N-1:0] STABLE_KEY   = 16'hFFFF,
  parameter logic [N-1:0] UNSTABLE_MASK = 16'h3090,
  parameter int unsigned SETTLE        = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         excite,
  output logic [N-1:0] key,
  output logic         valid
);

  int unsigned settle_cnt;
  logic        settling;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key        <= '0;
      valid      <= 1'b0;
      settle_cnt <= 0;
      settling   <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (excite) begin
        settling   <= 1'b1;
        settle_cnt <= SETTLE;
      end else if (settling) begin
        if (settle_cnt <= 1) begin
          settling <= 1'b0;
          for (int i = 0; i < N; i++)
            key[i] <= UNSTABLE_MASK[i] ? 1'($urandom_range(1)) : STABLE_KEY[i];
          valid <= 1'b1;
        end else begin
          settle_cnt <= settle_cnt - 1;
        end
      end
    end
  end

endmodule
