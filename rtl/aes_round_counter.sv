// aes_round_counter: sequences the NR round clocks of one encryption.
// A start pulse while idle clears the count and raises busy; the count then
// runs 0..NR-1, one step per clock, and on the clock after round NR-1 busy
// falls and done rises. done stays high until the next start. Starts while
// busy are ignored. last_round is high during round NR-1 and selects the
// MixColumns bypass. busy doubles as the trace-alignment trigger.
module aes_round_counter #(
  parameter int unsigned NR = 14
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic [$clog2(NR)-1:0] round,
  output logic                  busy,
  output logic                  last_round,
  output logic                  done
);
  timeunit 1ps; timeprecision 1ps;

  localparam logic [$clog2(NR)-1:0] LAST = $clog2(NR)'(NR - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      round <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else if (busy) begin
      if (round == LAST) begin
        round <= '0;
        busy  <= 1'b0;
        done  <= 1'b1;
      end else begin
        round <= round + 1'b1;
      end
    end else if (start) begin
      round <= '0;
      busy  <= 1'b1;
      done  <= 1'b0;
    end
  end

  assign last_round = busy && (round == LAST);
endmodule
