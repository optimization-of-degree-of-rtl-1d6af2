// rollover_counter: the free-running strobe generator used throughout the platform.
//
// The counter counts system clocks from 0 up to `period - 1`, then restarts at 0 and
// asserts `stb` for one cycle. The strobe therefore repeats every `period` clocks, so
// a rate is the system clock divided by `period`. A synchronous `restart` puts the
// counter back to 0; when STB_ON_RESTART is set the restart cycle itself also
// strobes, which lets a caller line its strobes up with an external event. `period`
// is read whenever the counter wraps, so a new value takes effect at the next
// wrap. A period of 0 or 1 strobes every cycle.
//
// The rollover counter with a load value and a strobe is the document's building
// block; the exact count range and the strobe-on-restart option are this design's.
module rollover_counter #(
  parameter int  WIDTH          = 16,
  parameter bit  STB_ON_RESTART = 1'b0
) (
  input  logic             clk,
  input  logic             rst,       // synchronous, active high
  input  logic [WIDTH-1:0] period,
  input  logic             restart,   // synchronous re-alignment
  output logic             stb
);

  logic [WIDTH-1:0] count;
  logic             wrap;

  assign wrap = ({1'b0, count} + (WIDTH+1)'(1)) >= {1'b0, period};

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      stb   <= 1'b0;
    end else if (restart) begin
      count <= '0;
      stb   <= STB_ON_RESTART;
    end else if (wrap) begin
      count <= '0;
      stb   <= 1'b1;
    end else begin
      count <= count + WIDTH'(1);
      stb   <= 1'b0;
    end
  end

endmodule
