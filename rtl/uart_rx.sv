// uart_rx: 8N1 UART receiver.
//
// The line is passed through a two-flop synchronizer. A falling edge while
// idle starts a frame; the fractional bit clock (see uart_tx) is started half
// a bit ahead, so that its ticks fall in the middle of each bit. The start
// bit is re-checked at its middle (a glitch returns to idle), eight data bits
// are sampled LSB first, and the byte is delivered if the stop bit is high;
// otherwise frame_err pulses and the byte is dropped.
//
// Interface: out_valid pulses for one clock with data; there is no
// back-pressure (the following bridge always accepts a byte). The 8N1
// format and the 12 MBaud rate follow the reference design; the rest is this
// design's choice.
module uart_rx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 12_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       out_valid,
  output logic [7:0] data,
  output logic       frame_err
);

  localparam int unsigned AW = $clog2(CLK_HZ + BAUD + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  state_e        state;
  logic [1:0]    sync;
  logic          rx;
  logic [AW-1:0] acc;
  logic          tick;
  logic [2:0]    bitn;

  assign rx   = sync[1];
  assign tick = (acc + AW'(BAUD)) >= AW'(CLK_HZ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= IDLE;
      acc       <= '0;
      bitn      <= '0;
      data      <= '0;
      out_valid <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      out_valid <= 1'b0;
      frame_err <= 1'b0;
      if (state == IDLE) begin
        if (!rx) begin
          state <= START;
          acc   <= AW'(CLK_HZ / 2);
        end
      end else begin
        acc <= tick ? acc + AW'(BAUD) - AW'(CLK_HZ) : acc + AW'(BAUD);
        if (tick) begin
          unique case (state)
            START: if (rx) state <= IDLE; else begin state <= DATA; bitn <= '0; end
            DATA: begin
              data <= {rx, data[7:1]};
              bitn <= bitn + 1'b1;
              if (bitn == 3'd7) state <= STOP;
            end
            STOP: begin
              state <= IDLE;
              if (rx) out_valid <= 1'b1; else frame_err <= 1'b1;
            end
            default: state <= IDLE;
          endcase
        end
      end
    end
  end

endmodule
