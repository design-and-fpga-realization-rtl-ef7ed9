// button_debounce: debounces a push button and emits one clock pulse per
// press.
//
// The raw level passes two synchronizing flops; the debounced level
// follows it only after it has been stable for STABLE_CYCLES clocks
// (default 1,000,000 = 10 ms at 100 MHz). `press` pulses for one clock on
// each rising edge of the debounced level. The document only says push
// buttons step through the values; debouncing and its time are this
// design's choice.
module button_debounce #(
  parameter int unsigned STABLE_CYCLES = 1_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic btn_raw,
  output logic level,
  output logic press
);

  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic          s1, s2;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1    <= 1'b0;
      s2    <= 1'b0;
      cnt   <= '0;
      level <= 1'b0;
      press <= 1'b0;
    end else begin
      s1    <= btn_raw;
      s2    <= s1;
      press <= 1'b0;
      if (s2 == level) begin
        cnt <= '0;
      end else if (cnt == CW'(STABLE_CYCLES - 1)) begin
        cnt   <= '0;
        level <= s2;
        press <= s2;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
