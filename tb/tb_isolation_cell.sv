// tb_isolation_cell: checks pass-through with iso_en = 0 and the clamp with
// iso_en = 1, for the design's clamp 0 / active-high cell and for a
// clamp-1 / active-low variant.
module tb_isolation_cell;
  logic [2:0] data, y0, y1;
  logic       iso_en;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  isolation_cell #(.WIDTH(3)) dut0 (.data(data), .iso_en(iso_en), .y(y0));
  isolation_cell #(.WIDTH(3), .CLAMP_VALUE(1'b1), .SENSE_HIGH(1'b0)) dut1 (.data(data), .iso_en(iso_en), .y(y1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("tb_isolation_cell: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      data   = 3'(i);
      iso_en = 1'(i >> 3);
      @(posedge clk);
      checks += 2;
      if (y0 !== (iso_en ? 3'b000 : data)) begin
        failures++;
        $display("FAIL clamp0/high: data=%b iso_en=%b y=%b", data, iso_en, y0);
      end
      if (y1 !== (iso_en ? data : 3'b111)) begin
        failures++;
        $display("FAIL clamp1/low: data=%b iso_en=%b y=%b", data, iso_en, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
