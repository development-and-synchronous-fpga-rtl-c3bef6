// prev_uart_reporter: sends a finished shortest-path tree over an RS-232
// serial line.
//
// On send_i (one clock, while idle) the module transmits the PREV list,
// node 0 first. Each entry is split into BYTES = ceil(IDW/8) bytes, least
// significant byte first, and each byte is one 8N1 frame on tx_o: a start
// bit (0), eight data bits LSB first, a stop bit (1). tx_o idles high. One
// bit lasts CLKS_PER_BIT clocks, so a full report lasts
// N * BYTES * 10 * CLKS_PER_BIT clocks; busy_o is high for exactly that
// time. prev_i must hold still while busy_o is high.
//
// The document only says that results left the board over RS-232 to a host
// program. Frame format, byte order and bit rate (115200 baud from a 50 MHz
// clock by default) are this design's choices.
module prev_uart_reporter #(
  parameter int unsigned N            = 5,
  parameter int unsigned IDW          = 3,
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           send_i,
  input  logic [IDW-1:0] prev_i [N],
  output logic           tx_o,
  output logic           busy_o
);

  localparam int unsigned BYTES = (IDW + 7) / 8;
  localparam int unsigned TOTAL = N * BYTES;            // bytes per report
  localparam int unsigned BW    = (CLKS_PER_BIT <= 2) ? 1 : $clog2(CLKS_PER_BIT);

  logic [31:0]   byte_q;        // index of the byte on the line
  logic [3:0]    bit_q;         // 0 = start, 1..8 = data, 9 = stop
  logic [BW-1:0] baud_q;
  logic [9:0]    frame_q;
  logic          busy_q;

  // Byte number b of the report.
  function automatic logic [7:0] report_byte(input logic [IDW-1:0] p [N],
                                             input logic [31:0] b);
    logic [8*BYTES-1:0] wide;
    wide = (8*BYTES)'(p[b / BYTES]);
    return wide[8*(b % BYTES) +: 8];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      byte_q  <= '0;
      bit_q   <= '0;
      baud_q  <= '0;
      frame_q <= '1;
    end else if (!busy_q) begin
      if (send_i) begin
        busy_q  <= 1'b1;
        byte_q  <= '0;
        bit_q   <= '0;
        baud_q  <= '0;
        frame_q <= {1'b1, report_byte(prev_i, 32'd0), 1'b0};
      end
    end else if (32'(baud_q) != CLKS_PER_BIT - 1) begin
      baud_q <= baud_q + 1'b1;
    end else begin
      baud_q <= '0;
      if (bit_q != 4'd9) begin
        bit_q   <= bit_q + 4'd1;
        frame_q <= {1'b1, frame_q[9:1]};
      end else if (byte_q == TOTAL - 1) begin
        busy_q  <= 1'b0;
      end else begin
        bit_q   <= '0;
        byte_q  <= byte_q + 1;
        frame_q <= {1'b1, report_byte(prev_i, byte_q + 1), 1'b0};
      end
    end
  end

  assign tx_o   = busy_q ? frame_q[0] : 1'b1;
  assign busy_o = busy_q;

endmodule
