// tb_dcr: writes random words through the column-redundancy shifter into a
// row model with one stuck column and reads them back through the same
// shifter; with the redundancy address on the stuck column the data must
// survive, and the row layout must match the shift rule.
module tb_dcr;
  logic ra_valid;
  logic [5:0] ra_pos;
  logic [63:0] wdata, rdata;
  logic [64:0] wrow, rrow;
  int checks = 0, failures = 0;

  dcr #(.WIDTH(64)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int col;
      bit stuck;
      logic [64:0] exp_row;
      col = $urandom_range(0, 63);
      stuck = 1'($urandom);
      ra_valid = 1'b1;
      ra_pos = 6'(col);
      wdata = {$urandom, $urandom};
      #1;
      // reference layout: bits below col unchanged, above shifted up by one
      exp_row = '0;
      for (int i = 0; i < 64; i++) exp_row[i < col ? i : i + 1] = wdata[i];
      checks++;
      if (wrow !== exp_row) begin
        failures++; $display("FAIL layout col=%0d", col);
      end
      rrow = wrow;
      rrow[col] = stuck;     // faulty cell
      #1;
      checks++;
      if (rdata !== wdata) begin failures++; $display("FAIL data col=%0d %h %h", col, rdata, wdata); end
    end
    // pass-through without a redundancy address
    ra_valid = 1'b0; wdata = 64'h0123_4567_89ab_cdef; #1;
    checks++; if (wrow !== {1'b0, wdata}) failures++;
    rrow = {1'b1, wdata}; #1;
    checks++; if (rdata !== wdata) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
