// Time pulse generator of the master control.
//
// Every order runs through one memory cycle of PULSES time pulses, one clock each. The
// chain follows the nine-pulse memory cycle of the reference design's master control
// (pulse 1 raises the memory read flip-flop, pulse 4 drops it, pulses 6 to 8 frame the
// write, pulse 9 resets the logic); mapping one time pulse to one clock is this design's
// choice. tp is one-hot, tp[k-1] meaning time pulse k; it is all zero when idle.
//
// Interface: start begins a cycle with pulse 1 on the next clock; it is accepted when idle
// or during the last pulse, so orders can follow each other every PULSES clocks. hold
// keeps the chain on its current pulse (the master control uses it to repeat the EXP
// step). last is high during the final pulse.
module pulse_chain #(
  parameter int unsigned PULSES = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              hold,
  output logic [PULSES-1:0] tp,
  output logic              idle,
  output logic              last
);

  localparam int unsigned CW = $clog2(PULSES + 1);

  logic [CW-1:0] step;  // 0 = idle, k = time pulse k

  assign idle = step == '0;
  assign last = step == CW'(PULSES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0;
    end else if (start && (idle || last)) begin
      step <= CW'(1);
    end else if (!idle && !hold) begin
      step <= last ? '0 : step + CW'(1);
    end
  end

  always_comb begin
    tp = '0;
    for (int unsigned k = 1; k <= PULSES; k++) begin
      tp[k-1] = step == CW'(k);
    end
  end

endmodule
