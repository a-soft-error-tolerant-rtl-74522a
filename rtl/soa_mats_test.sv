// Transparent SOA-MATS++ test controller for a FIFO storage array.
//
// A transparent test checks memory in the field without destroying its
// contents. For every location i the controller runs three iterations j:
//   j = 0  temp <- read(i); original <- temp; write(i, ~temp)
//   j = 1  temp <- read(i); result = temp ^ original, all ones expected
//          (a 0 marks a bit that did not invert: stuck-at or transition
//          fault); write(i, ~temp) restores the word
//   j = 2  temp <- read(i); result = temp ^ original, all zeros expected
//          (a 1 marks a bit that did not restore)
// then i advances. The three iterations follow the document; writing ~temp
// as the restore, the cycle plan and the reporting are this design's
// choices.
//
// Interface: a one-cycle start pulse while idle begins a pass over all DEPTH
// locations. m_en is high while the controller owns the memory port; m_rdata
// must be the word at m_addr in the same cycle, m_we writes m_wdata at the
// clock edge. Each j takes two cycles (read, then compare/write), so a pass
// takes 6*DEPTH cycles, after which done pulses for one cycle. fault is
// sticky until the next start; fault_addr and fault_bits record the first
// faulty location and its deviating bits; result holds the last compare
// pattern.
module soa_mats_test
  import cdmr_pkg::*;
#(
  parameter int unsigned WORD  = 4,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            m_en,
  output logic [AW-1:0]   m_addr,
  output logic            m_we,
  output logic [WORD-1:0] m_wdata,
  input  logic [WORD-1:0] m_rdata,
  output logic            busy,
  output logic            done,
  output logic            fault,
  output logic [AW-1:0]   fault_addr,
  output logic [WORD-1:0] fault_bits,
  output logic [WORD-1:0] result
);

  mats_phase_t     j;
  logic            act;        // 0: read cycle, 1: compare / write cycle
  logic [AW-1:0]   i;
  logic [WORD-1:0] temp, original;
  logic [WORD-1:0] cmp, bad;

  always_comb begin
    m_en    = busy;
    m_addr  = i;
    m_we    = busy && act && (j != MATS_J2);
    m_wdata = ~temp;
    cmp     = temp ^ original;
    bad     = (j == MATS_J1) ? ~cmp : cmp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      act        <= 1'b0;
      j          <= MATS_J0;
      i          <= '0;
      temp       <= '0;
      original   <= '0;
      fault      <= 1'b0;
      fault_addr <= '0;
      fault_bits <= '0;
      result     <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy       <= 1'b1;
          act        <= 1'b0;
          j          <= MATS_J0;
          i          <= '0;
          fault      <= 1'b0;
          fault_addr <= '0;
          fault_bits <= '0;
        end
      end else if (!act) begin
        temp <= m_rdata;
        act  <= 1'b1;
      end else begin
        act <= 1'b0;
        unique case (j)
          MATS_J0: begin
            original <= temp;
            j        <= MATS_J1;
          end
          MATS_J1, MATS_J2: begin
            result <= cmp;
            if (|bad && !fault) begin
              fault      <= 1'b1;
              fault_addr <= i;
              fault_bits <= bad;
            end
            if (j == MATS_J1) begin
              j <= MATS_J2;
            end else begin
              j <= MATS_J0;
              if (i == AW'(DEPTH - 1)) begin
                busy <= 1'b0;
                done <= 1'b1;
              end else begin
                i <= i + 1'b1;
              end
            end
          end
          default: j <= MATS_J0;
        endcase
      end
    end
  end

endmodule
