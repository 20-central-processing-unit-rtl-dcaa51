// bus_mux_tb: 4-bit 3-way one-hot bus mux. For random input busses, each
// single selection line must put its bus on the output, and no selection
// must give all zeros.
module bus_mux_tb;
  localparam int W = 4, M = 3;
  logic [M-1:0][W-1:0] in_bus;
  logic [M-1:0]        sel;
  logic [W-1:0]        out_bus;
  int checks = 0, failures = 0;

  bus_mux #(.W(W), .M(M)) dut (.in_bus(in_bus), .sel(sel), .out_bus(out_bus));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      for (int m = 0; m < M; m++) in_bus[m] = W'($urandom);
      for (int k = -1; k < M; k++) begin
        logic [W-1:0] expv;
        sel = (k < 0) ? '0 : M'(1 << k);
        expv = (k < 0) ? '0 : in_bus[k];
        #1;
        checks++;
        if (out_bus !== expv) begin
          failures++;
          $display("mismatch: sel=%b out=%h exp=%h", sel, out_bus, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
