// keypad_scanner: column-polling scanner for the 4x4 keypad.
//
// One column at a time is driven low (columns = 1110, 1101, 1011, 0111, ...).
// The column moves on once per scan tick, but only while every row reads
// high: as soon as a row is low the scan pauses on that column, so the held
// key stays selected for as long as it is down. Rows come from a mechanical
// keypad and pass a two-flop synchroniser; the column value is delayed by the
// same two cycles so that a row reading is always decoded against the column
// that produced it. pressed is high while exactly one key of the paused
// column is down; key is its code (see key_decoder).
//
// Interface: tick is a one-cycle enable (a slow time base, 2^8 clocks in the
// default configuration); rows/columns are active low. Reset selects column
// 0. Latency from a row going low to pressed: 3 clocks.
module keypad_scanner
  import lightbox_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic [3:0] rows,
  output logic [3:0] columns,
  output logic       pressed,
  output key_e       key
);
  logic [3:0] rows_m, rows_s;   // synchroniser stages
  logic [3:0] col_d1, col_d2;   // column delayed to line up with rows_s
  logic       any_low, valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      rows_m <= 4'hF;
      rows_s <= 4'hF;
      col_d1 <= 4'b1110;
      col_d2 <= 4'b1110;
    end else begin
      rows_m <= rows;
      rows_s <= rows_m;
      col_d1 <= columns;
      col_d2 <= col_d1;
    end
  end

  // Pause while any row reads low, or while the delayed column still differs
  // (a reading in flight from the previous column).
  assign any_low = ~&rows_s;

  always_ff @(posedge clk) begin
    if (rst)
      columns <= 4'b1110;
    else if (tick && !any_low && col_d2 == columns)
      columns <= {columns[2:0], columns[3]};
  end

  key_decoder u_dec (
    .columns(col_d2),
    .rows   (rows_s),
    .key    (key),
    .valid  (valid)
  );

  assign pressed = valid && (col_d2 == columns);
endmodule
