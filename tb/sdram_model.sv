// sdram_model: behavioural model of a 16M x 16 single-data-rate SDRAM
// (4 banks, 8192 rows, 512 columns), for simulation only.
// It decodes the command pins on each rising clock, keeps written words in
// a sparse array, returns read data CL clocks after the READ command, and
// counts protocol errors: an access before the mode register is loaded, an
// ACTIVATE to an open bank, a READ/WRITE to a closed bank, or a command
// other than NOP sooner than the bank's auto-precharge has finished.
module sdram_model #(
  parameter int CL = 2
) (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [12:0] a,
  input  logic [15:0] dq_in,
  output logic [15:0] dq_out
);
  logic [15:0] mem [int];
  logic [12:0] open_row [4];
  bit          is_open  [4];
  bit          mode_set = 0;
  int          errors = 0, refreshes = 0, writes = 0, reads = 0;
  longint      cycle = 0;
  typedef struct { longint due; logic [15:0] data; } rd_t;
  rd_t         rq[$];

  initial begin
    dq_out = '0;
    for (int i = 0; i < 4; i++) is_open[i] = 0;
  end

  function automatic int word_addr(input logic [12:0] row, input logic [1:0] bank,
                                   input logic [8:0] col);
    return int'({row, bank, col});
  endfunction

  always @(posedge clk) begin
    cycle++;
    if (cke && !cs_n) begin
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin // ACTIVATE
          if (!mode_set || is_open[ba]) errors++;
          is_open[ba]  = 1;
          open_row[ba] = a;
        end
        3'b101, 3'b100: begin // READ / WRITE (auto-precharge expected)
          if (!mode_set || !is_open[ba] || !a[10]) errors++;
          if (we_n == 1'b0) begin
            mem[word_addr(open_row[ba], ba, a[8:0])] = dq_in;
            writes++;
          end else begin
            rd_t r;
            r.due  = cycle + CL - 1;
            r.data = mem.exists(word_addr(open_row[ba], ba, a[8:0])) ?
                     mem[word_addr(open_row[ba], ba, a[8:0])] : 16'hDEAD;
            rq.push_back(r);
            reads++;
          end
          is_open[ba] = 0;
        end
        3'b010: begin // PRECHARGE
          if (a[10]) for (int i = 0; i < 4; i++) is_open[i] = 0;
          else is_open[ba] = 0;
        end
        3'b001: begin // AUTO REFRESH
          for (int i = 0; i < 4; i++) if (is_open[i]) errors++;
          refreshes++;
        end
        3'b000: mode_set = (a[6:4] == 3'(CL)) && (a[2:0] == 3'b000);
        default: ;
      endcase
    end
    if (rq.size() > 0 && rq[0].due == cycle) begin
      dq_out <= rq[0].data;
      void'(rq.pop_front());
    end
  end
endmodule
