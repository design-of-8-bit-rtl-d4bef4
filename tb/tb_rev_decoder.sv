// Test of the Fredkin-tree decoder at N = 3 and N = 4, the two sizes the
// processor uses. For every address with chip select high, the output must be
// the one-hot word 1 << sel. With chip select low, the output must be all
// zeros.
module tb_rev_decoder;
  int checks = 0, failures = 0;

  logic       cs3, cs4;
  logic [2:0] s3;
  logic [3:0] s4;
  logic [7:0] y3;
  logic [15:0] y4;

  rev_decoder #(.N(3)) dut3 (.cs(cs3), .sel(s3), .y(y3));
  rev_decoder #(.N(4)) dut4 (.cs(cs4), .sel(s4), .y(y4));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int v = 0; v < 16; v++) begin
        cs3 = c[0]; cs4 = c[0];
        s3 = v[2:0]; s4 = v[3:0];
        #1;
        checks += 2;
        if (y3 !== (c[0] ? 8'(1) << v[2:0] : 8'h00)) begin
          failures++; $display("FAIL N=3 cs=%0d sel=%0d y=%b", c, v[2:0], y3);
        end
        if (y4 !== (c[0] ? 16'(1) << v[3:0] : 16'h0000)) begin
          failures++; $display("FAIL N=4 cs=%0d sel=%0d y=%b", c, v, y4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
