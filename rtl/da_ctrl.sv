// da_ctrl -- sequencer of a DA FIR filter.
//
// Counts the L = N/D digits of the sample being processed. A new sample is
// taken (load) when in_valid and in_ready are both high; in_ready is high
// when the filter is idle or busy with the last digit of the previous
// sample, so a continuous input stream is taken at one sample every L
// clocks. While busy, `shift` advances the P/S register and the SRL delay
// line by one digit per clock. Without input the filter idles and the delay
// line holds its contents.
// The digit flags -- valid, first, last and A/S (subtract on the last digit,
// which carries the sign bit) -- are generated with the digit entering the
// ROMs and delayed by P clocks, the adder-tree latency, so they reach the
// scaling accumulator together with that digit's sums.
// The A/S control is the one drawn in the DA block diagrams; the handshake
// and the rest of the sequencing are this design's own.
module da_ctrl #(
  parameter int L = 8,   // digits per sample
  parameter int P = 0    // adder-tree latency in clocks
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic load,
  output logic shift,
  output logic acc_valid,
  output logic acc_first,
  output logic acc_sub,
  output logic acc_last
);

  localparam int CNTW = (L > 1) ? $clog2(L) : 1;

  typedef struct packed {
    logic valid;
    logic first;
    logic sub;
    logic last;
  } flags_t;

  logic            busy;
  logic [CNTW-1:0] cnt;
  logic            last_digit;
  flags_t          f0;

  assign last_digit = (cnt == CNTW'(L - 1));
  assign in_ready   = !busy || last_digit;
  assign load       = in_valid && in_ready;
  assign shift      = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (load) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (busy) begin
      if (last_digit) busy <= 1'b0;
      else            cnt  <= cnt + 1'b1;
    end
  end

  assign f0 = '{valid: busy, first: busy && cnt == '0, sub: busy && last_digit, last: busy && last_digit};

  flags_t fd;
  if (P == 0) begin : g_nodelay
    assign fd = f0;
  end else begin : g_delay
    flags_t pipe [P];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < P; i++) pipe[i] <= '0;
      end else begin
        pipe[0] <= f0;
        for (int i = 1; i < P; i++) pipe[i] <= pipe[i-1];
      end
    end
    assign fd = pipe[P-1];
  end

  assign acc_valid = fd.valid;
  assign acc_first = fd.first;
  assign acc_sub   = fd.sub;
  assign acc_last  = fd.last;

  // the digit counter never leaves 0 .. L-1
  a_cnt_range : assert property (@(posedge clk) disable iff (!rst_n) cnt <= CNTW'(L - 1));

endmodule
