// tb_averaging: drives the two line inputs of the averaging stage directly
// with random codes in five patterns (same-clock pair, line A one clock ahead
// of B, B ahead of A, A alone, B alone) and checks each output word and the
// clock it appears on against values computed here:
//   pair:        coarse = common coarse, fine_sum = a + b,        1 clock
//   skewed pair: coarse = later coarse,  fine_sum = a + b + 180,  1 clock after the later
//   single:      coarse = its coarse,    fine_sum = 2 * code,     2 clocks, single = 1
// Each pattern must occur.
`timescale 1ps / 1fs
module tb_averaging;
  import tdc_pkg::*;
  logic clk = 0, rst;
  logic a_valid, b_valid;
  logic [7:0] a_code, b_code;
  logic [COARSE_W-1:0] a_coarse, b_coarse;
  logic out_valid, skewed_pair, single_sent;
  tdc_hit_t out;
  int checks = 0, failures = 0;
  int n_edge = 0;
  int seen [5];

  typedef struct { int edge_idx; int coarse; int fine; bit single; } exp_t;
  exp_t expq[$];

  averaging #(.W(8), .P(180)) dut (
    .clk(clk), .rst(rst), .a_valid(a_valid), .a_code(a_code), .a_coarse(a_coarse),
    .b_valid(b_valid), .b_code(b_code), .b_coarse(b_coarse),
    .out_valid(out_valid), .out(out), .skewed_pair(skewed_pair), .single_sent(single_sent));

  always #1562.5 clk = ~clk;

  always @(posedge clk) begin
    n_edge++;
    #1;
    if (!rst) begin
      if (out_valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL unexpected output at edge %0d", n_edge);
        end else begin
          exp_t e;
          e = expq.pop_front();
          if (e.edge_idx != n_edge || int'(out.coarse) != e.coarse ||
              int'(out.fine_sum) != e.fine || out.single != e.single) begin
            failures++;
            $display("FAIL edge %0d got c=%0d f=%0d s=%0b, expected edge %0d c=%0d f=%0d s=%0b",
                     n_edge, out.coarse, out.fine_sum, out.single,
                     e.edge_idx, e.coarse, e.fine, e.single);
          end
        end
      end else if (expq.size() > 0 && n_edge >= expq[0].edge_idx) begin
        failures++;
        $display("FAIL missing output due at edge %0d", expq[0].edge_idx);
        void'(expq.pop_front());
      end
    end
  end

  task automatic idle();
    @(posedge clk); #2;
    a_valid = 0; b_valid = 0;
  endtask

  initial begin
    rst = 1; a_valid = 0; b_valid = 0; a_code = 0; b_code = 0; a_coarse = 0; b_coarse = 0;
    repeat (3) @(posedge clk);
    #2 rst = 0;
    for (int n = 0; n < 400; n++) begin
      automatic int kind = int'($urandom_range(4));
      automatic int ca = int'($urandom_range(200));
      automatic int cb = int'($urandom_range(200));
      automatic int cc = int'($urandom_range(100000));
      exp_t e;
      @(posedge clk); #2;
      // inputs now set are sampled at edge n_edge + 1
      case (kind)
        0: begin
          a_valid = 1; b_valid = 1; a_code = 8'(ca); b_code = 8'(cb);
          a_coarse = COARSE_W'(cc); b_coarse = COARSE_W'(cc);
          e = '{n_edge + 1, cc, ca + cb, 0};
          expq.push_back(e);
          idle();
        end
        1, 2: begin
          e = '{n_edge + 2, cc + 1, ca + cb + 180, 0};
          expq.push_back(e);
          if (kind == 1) begin
            a_valid = 1; a_code = 8'(ca); a_coarse = COARSE_W'(cc);
            idle();
            b_valid = 1; b_code = 8'(cb); b_coarse = COARSE_W'(cc + 1);
          end else begin
            b_valid = 1; b_code = 8'(cb); b_coarse = COARSE_W'(cc);
            idle();
            a_valid = 1; a_code = 8'(ca); a_coarse = COARSE_W'(cc + 1);
          end
          idle();
        end
        default: begin
          e = '{n_edge + 2, cc, 2 * ((kind == 3) ? ca : cb), 1};
          expq.push_back(e);
          if (kind == 3) begin a_valid = 1; a_code = 8'(ca); a_coarse = COARSE_W'(cc); end
          else           begin b_valid = 1; b_code = 8'(cb); b_coarse = COARSE_W'(cc); end
          idle();
        end
      endcase
      seen[kind]++;
      repeat (2) idle();
    end
    repeat (4) idle();
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL pattern %0d never driven", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
