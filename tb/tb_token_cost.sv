// tb_token_cost: checks committed-instruction cost = group base tokens +
// RUU cycles, saturating at 255, over every group with random and edge
// residencies.
module tb_token_cost;
  localparam int unsigned L = 4;
  localparam int BASE [8] = '{4, 6, 8, 10, 12, 16, 20, 28};
  logic [2:0] group [L];
  logic [7:0] ruu_cyc [L];
  logic [7:0] tokens [L];
  int checks = 0, failures = 0;

  token_cost dut (.group, .ruu_cyc, .tokens);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      for (int l = 0; l < L; l++) begin
        group[l]   = 3'($urandom);
        case ($urandom_range(0, 3))
          0: ruu_cyc[l] = 8'd0;
          1: ruu_cyc[l] = 8'd255;
          2: ruu_cyc[l] = 8'(255 - BASE[group[l]] + $urandom_range(0, 1));
          default: ruu_cyc[l] = 8'($urandom);
        endcase
      end
      #1;
      for (int l = 0; l < L; l++) begin
        int e;
        e = BASE[group[l]] + int'(ruu_cyc[l]);
        if (e > 255) e = 255;
        checks++;
        if (int'(tokens[l]) != e) begin
          failures++;
          $display("lane %0d group %0d cyc %0d: got %0d exp %0d", l, group[l], ruu_cyc[l], tokens[l], e);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
