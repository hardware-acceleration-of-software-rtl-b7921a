// string_accel_top: serial-attached hardware accelerator for C string functions.
//
// A host sends the operands of one string-library call over an RS-232 link
// (115200 baud, 8N1) as STX string1 ETX [STX string2 ETX]; the accelerator
// runs the function in dedicated logic and sends the answer back as ASCII
// characters. Data path, in order:
//   uart_rx (start-bit detection, mid-bit sampling, 128-byte FIFO)
//   -> string_formatter (strips STX/ETX, builds two N-character operands)
//   -> the function unit chosen by `func_sel` (strcmp, strcasecmp, strstr,
//      strchr, strchr_pos, strrchr, strupr, strlwr, strlen)
//   -> uart_tx (128-byte FIFO, 8N1 framing).
// Only the selected unit is started; single-answer units push their `result`
// byte into the transmit FIFO when `done`, strupr/strlwr push every converted
// character as it is produced. `func_sel` must be stable while a request is
// in flight. timing_probe raises `probe_start` when the operation starts and
// `probe_done` when it finishes (oscilloscope pins) and reports the cycle
// count on `op_cycles`; hex7seg decoders show the last byte sent (hex_lo/hi)
// and the last byte received (hex_rx_lo/hi) as two hex digits each.
// Putting all nine functions behind one select input is this design's choice;
// the operand size (8 characters), baud timing and FIFO depths are the
// original prototype's.
module string_accel_top
  import str_pkg::*;
#(
  parameter int unsigned N                    = MAX_CHARS,
  parameter int unsigned BAUD_COUNTER_WIDTH   = 9,
  parameter int unsigned BAUD_TICK_COUNT      = 433,
  parameter int unsigned HALF_BAUD_TICK_COUNT = 216,
  parameter int unsigned FIFO_DEPTH           = 128
) (
  input  logic        clk,
  input  logic        rst,
  input  func_e       func_sel,
  input  logic        uart_rxd,
  output logic        uart_txd,
  output logic        probe_start,
  output logic        probe_done,
  output logic [15:0] op_cycles,
  output logic [6:0]  hex_lo,
  output logic [6:0]  hex_hi,
  output logic [6:0]  hex_rx_lo,
  output logic [6:0]  hex_rx_hi
);

  // ---------------- receive side ----------------
  logic [7:0]     rx_data;
  logic           rx_valid, rx_pop;
  logic [8*N-1:0] str1, str2;
  logic           str_ready, receiving;

  uart_rx #(
    .BAUD_COUNTER_WIDTH  (BAUD_COUNTER_WIDTH),
    .BAUD_TICK_COUNT     (BAUD_TICK_COUNT),
    .HALF_BAUD_TICK_COUNT(HALF_BAUD_TICK_COUNT),
    .DEPTH               (FIFO_DEPTH)
  ) u_rx (
    .clk, .rst,
    .rxd     (uart_rxd),
    .rd_en   (rx_pop),
    .rd_data (rx_data),
    .valid   (rx_valid)
  );

  logic fmt_ready;
  assign rx_pop = rx_valid && fmt_ready;

  string_formatter #(.N(N)) u_fmt (
    .clk, .rst,
    .in_valid    (rx_valid),
    .in_data     (rx_data),
    .in_ready    (fmt_ready),
    .two_strings (needs_two(func_sel)),
    .str1        (str1),
    .str2        (str2),
    .str_ready   (str_ready),
    .receiving   (receiving)
  );

  // ---------------- function units ----------------
  logic [8:0] go;                          // start, one bit per function
  always_comb begin
    go = '0;
    go[func_sel] = str_ready;
  end

  logic [8:0] fdone;
  logic [7:0] fres [9];
  logic       up_valid, lw_valid;
  logic [7:0] up_char, lw_char;
  logic       ss_found;
  logic [$clog2(N):0] ss_pos;

  strcmp_unit #(.N(N)) u_strcmp (
    .clk, .rst, .start(go[F_STRCMP]), .str1, .str2,
    .done(fdone[F_STRCMP]), .result(fres[F_STRCMP]));

  strcasecmp_unit #(.N(N)) u_strcasecmp (
    .clk, .rst, .start(go[F_STRCASECMP]), .str1, .str2,
    .done(fdone[F_STRCASECMP]), .result(fres[F_STRCASECMP]));

  strstr_unit #(.N(N)) u_strstr (
    .clk, .rst, .start(go[F_STRSTR]), .str1, .str2,
    .done(fdone[F_STRSTR]), .result(fres[F_STRSTR]),
    .found(ss_found), .pos(ss_pos));

  strchr_unit #(.N(N)) u_strchr (
    .clk, .rst, .start(go[F_STRCHR]), .str1, .str2,
    .done(fdone[F_STRCHR]), .result(fres[F_STRCHR]));

  strchr_pos_unit #(.N(N)) u_strchr_pos (
    .clk, .rst, .start(go[F_STRCHR_POS]), .str1, .str2,
    .done(fdone[F_STRCHR_POS]), .result(fres[F_STRCHR_POS]));

  strrchr_unit #(.N(N)) u_strrchr (
    .clk, .rst, .start(go[F_STRRCHR]), .str1, .str2,
    .done(fdone[F_STRRCHR]), .result(fres[F_STRRCHR]));

  strupr_unit #(.N(N)) u_strupr (
    .clk, .rst, .start(go[F_STRUPR]), .str1,
    .done(fdone[F_STRUPR]), .out_valid(up_valid), .out_char(up_char));

  strlwr_unit #(.N(N)) u_strlwr (
    .clk, .rst, .start(go[F_STRLWR]), .str1,
    .done(fdone[F_STRLWR]), .out_valid(lw_valid), .out_char(lw_char));

  strlen_unit #(.N(N)) u_strlen (
    .clk, .rst, .start(go[F_STRLEN]), .str1,
    .done(fdone[F_STRLEN]), .result(fres[F_STRLEN]));

  assign fres[F_STRUPR] = up_char;
  assign fres[F_STRLWR] = lw_char;

  // ---------------- result to the transmitter ----------------
  logic       tx_wr;
  logic [7:0] tx_byte;

  always_comb begin
    unique case (func_sel)
      F_STRUPR: tx_wr = up_valid;
      F_STRLWR: tx_wr = lw_valid;
      default:  tx_wr = fdone[func_sel];
    endcase
    tx_byte = fres[func_sel];
  end

  logic       tx_busy;
  logic [7:0] tx_space;

  uart_tx #(
    .BAUD_COUNTER_WIDTH  (BAUD_COUNTER_WIDTH),
    .BAUD_TICK_COUNT     (BAUD_TICK_COUNT),
    .HALF_BAUD_TICK_COUNT(HALF_BAUD_TICK_COUNT),
    .DEPTH               (FIFO_DEPTH)
  ) u_tx (
    .clk, .rst,
    .wr_en      (tx_wr),
    .wr_data    (tx_byte),
    .txd        (uart_txd),
    .busy       (tx_busy),
    .fifo_space (tx_space)
  );

  // ---------------- measurement and display ----------------
  timing_probe #(.CNT_W(16)) u_probe (
    .clk, .rst,
    .arm         (receiving),
    .op_start    (str_ready),
    .op_done     (|fdone),
    .probe_start (probe_start),
    .probe_done  (probe_done),
    .cycles      (op_cycles)
  );

  logic [7:0] shown;
  always_ff @(posedge clk) begin
    if (rst)        shown <= '0;
    else if (tx_wr) shown <= tx_byte;
  end

  logic [7:0] last_rx;
  always_ff @(posedge clk) begin
    if (rst)         last_rx <= '0;
    else if (rx_pop) last_rx <= rx_data;
  end

  hex7seg u_hex_lo    (.nibble(shown[3:0]),   .seg(hex_lo));
  hex7seg u_hex_hi    (.nibble(shown[7:4]),   .seg(hex_hi));
  hex7seg u_hex_rx_lo (.nibble(last_rx[3:0]), .seg(hex_rx_lo));
  hex7seg u_hex_rx_hi (.nibble(last_rx[7:4]), .seg(hex_rx_hi));

endmodule
