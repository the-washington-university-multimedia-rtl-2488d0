// null_cell_delete: Null Cell Deletion of the "Y" connection.
//
// The host's ATM card sends a continuous cell stream in which idle slots are
// filled with empty cells.  Only real host cells may be merged into the MMX's
// outgoing stream, so this block removes every cell whose GFC, VPI and VCI
// fields are all zero (the ATM unassigned and idle cells; the test is taken
// from the ATM standard, the document only names the block) and writes the
// others into the YFIFO.  Bytes pass through a four-stage delay line so the
// verdict, taken when header byte 3 arrives, is known before byte 0 is
// written.  The line shifts on in_valid; the bytes of a cell must arrive on
// consecutive strobes, and between cells the line drains by itself.  wr_en /
// wr_data are registered.
module null_cell_delete
  import mmx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_soc,
  input  logic [7:0]  in_data,
  output logic        wr_en,
  output logic [7:0]  wr_data,
  output logic [15:0] cells_kept,
  output logic [15:0] cells_deleted
);
  typedef struct packed {
    logic       valid;
    logic       soc;
    logic [7:0] data;
  } stage_t;

  stage_t     stg [HDR_BYTES];
  logic [5:0] rcv_cnt, in_pos;
  logic       any_held, shift;
  logic       keep_next, keep_cur;
  logic       is_null;

  assign in_pos = in_soc ? 6'd0 : rcv_cnt;
  always_comb begin
    any_held = 1'b0;
    for (int i = 0; i < HDR_BYTES; i++) any_held |= stg[i].valid;
  end
  assign shift = in_valid || (any_held && rcv_cnt == 6'd0);
  // byte 3 on in_data: GFC/VPI/VCI are bytes 0..2 and the top nibble of byte 3
  assign is_null = (stg[2].data == 8'h00) && (stg[1].data == 8'h00) &&
                   (stg[0].data == 8'h00) && (in_data[7:4] == 4'h0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HDR_BYTES; i++) stg[i] <= '0;
      rcv_cnt       <= '0;
      keep_next     <= 1'b0;
      keep_cur      <= 1'b0;
      wr_en         <= 1'b0;
      wr_data       <= '0;
      cells_kept    <= '0;
      cells_deleted <= '0;
    end else begin
      wr_en <= 1'b0;
      if (in_valid) begin
        rcv_cnt <= (in_pos == 6'(CELL_BYTES-1)) ? 6'd0 : in_pos + 6'd1;
        if (in_pos == 6'(HDR_BYTES-1)) begin
          keep_next <= !is_null;
          if (is_null) cells_deleted <= cells_deleted + 16'd1;
          else         cells_kept    <= cells_kept + 16'd1;
        end
      end
      if (shift) begin
        stg[0] <= '{valid: in_valid, soc: in_valid && in_soc, data: in_data};
        for (int i = 1; i < HDR_BYTES; i++) stg[i] <= stg[i-1];
        if (stg[HDR_BYTES-1].valid) begin
          if (stg[HDR_BYTES-1].soc) begin
            keep_cur <= keep_next;
            wr_en    <= keep_next;
          end else begin
            wr_en <= keep_cur;
          end
          wr_data <= stg[HDR_BYTES-1].data;
        end
      end
    end
  end
endmodule
