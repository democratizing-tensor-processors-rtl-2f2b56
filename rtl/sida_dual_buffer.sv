// SIDA on-chip buffer with dual sparse storage.
//
// The OS core needs the matrix column by column, the IS core row by row, so
// the buffer keeps each loaded element twice in spirit: in a CSC space and,
// converted, in a CSR space.
//  * CSC space: a ring of CSC_DEPTH elements. Columns are appended in
//    ascending column order (csc_we, one element per cycle) and a whole
//    consumed sub-tensor is evicted at once (csc_free of n elements). A read
//    returns NPE consecutive elements starting at csc_rptr (banked SRAM).
//  * CSR space: CSR_DEPTH elements. The first converted element of a row
//    reserves row_len entries (the row's non-zero count from the CSR index
//    array) at the allocation pointer; later elements of the row go to the
//    next free slot of that reservation. Columns arrive in ascending order,
//    so each row's elements end up consecutive and sorted. If a reservation
//    does not fit, the element is dropped and conv_dropped pulses.
//    row_base / row_fill give a row's base address and its number of stored
//    elements; a read returns NPE consecutive elements from csr_rptr.
// "clear" empties both spaces and all reservations.
// The two spaces, reservation on the first converted element and whole-column
// eviction follow the document; repacking of the CSR space, eviction of
// rows on overflow and the blocked storage format are not implemented.
module sida_dual_buffer
  import sida_pkg::*;
#(
  parameter int unsigned CSC_DEPTH = 2097152,   // 32 MB of 16-byte elements
  parameter int unsigned CSR_DEPTH = 2097152,   // 32 MB
  parameter int unsigned NVEC      = 65536,     // rows tracked
  parameter int unsigned NPE       = 1024       // read width
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  // CSC space
  input  logic                        csc_we,
  input  elem_t                       csc_wdata,
  input  logic                        csc_free,
  input  logic [$clog2(CSC_DEPTH):0]  csc_free_n,
  output logic [$clog2(CSC_DEPTH)-1:0] csc_head,
  output logic [$clog2(CSC_DEPTH):0]  csc_count,
  input  logic [$clog2(CSC_DEPTH)-1:0] csc_rptr,
  output elem_t                       csc_rdata [NPE],
  // conversion into the CSR space
  input  logic                        conv_we,
  input  elem_t                       conv_wdata,
  input  logic [31:0]                 conv_row_len,
  output logic                        conv_dropped,
  // CSR space
  input  logic [$clog2(NVEC)-1:0]     row_sel,
  output logic [$clog2(CSR_DEPTH)-1:0] row_base,
  output logic [31:0]                 row_fill,
  input  logic [$clog2(CSR_DEPTH)-1:0] csr_rptr,
  output elem_t                       csr_rdata [NPE],
  output logic [$clog2(CSR_DEPTH):0]  csr_used
);
  localparam int unsigned CW = $clog2(CSC_DEPTH);
  localparam int unsigned RW = $clog2(CSR_DEPTH);
  localparam int unsigned VW = $clog2(NVEC);

  elem_t          csc_mem [CSC_DEPTH];
  elem_t          csr_mem [CSR_DEPTH];
  logic [CW-1:0]  csc_tail;
  logic [RW:0]    alloc_q;
  logic [NVEC-1:0] reserved;
  logic [RW-1:0]  base_tab [NVEC];
  logic [31:0]    fill_tab [NVEC];

  // CSC ring
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      csc_head  <= '0;
      csc_tail  <= '0;
      csc_count <= '0;
    end else if (clear) begin
      csc_head  <= '0;
      csc_tail  <= '0;
      csc_count <= '0;
    end else begin
      if (csc_we) csc_tail <= csc_tail + 1'b1;
      if (csc_free) csc_head <= csc_head + CW'(csc_free_n);
      csc_count <= csc_count + (CW+1)'(csc_we) - (csc_free ? csc_free_n : '0);
    end
  end

  always_ff @(posedge clk) begin
    if (csc_we) csc_mem[csc_tail] <= csc_wdata;
  end

  always_comb begin
    for (int unsigned p = 0; p < NPE; p++)
      csc_rdata[p] = csc_mem[csc_rptr + CW'(p)];
  end

  // CSR space with reservation
  logic [VW-1:0] crow;
  logic          fits;
  assign crow = conv_wdata.row[VW-1:0];
  assign fits = (32'(alloc_q) + conv_row_len) <= CSR_DEPTH;
  assign conv_dropped = conv_we && !reserved[crow] && !fits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alloc_q  <= '0;
      reserved <= '0;
    end else if (clear) begin
      alloc_q  <= '0;
      reserved <= '0;
    end else if (conv_we && !reserved[crow] && fits) begin
      alloc_q        <= alloc_q + (RW+1)'(conv_row_len);
      reserved[crow] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (conv_we) begin
      if (!reserved[crow]) begin
        if (fits) begin
          base_tab[crow]              <= alloc_q[RW-1:0];
          fill_tab[crow]              <= 32'd1;
          csr_mem[alloc_q[RW-1:0]]    <= conv_wdata;
        end
      end else begin
        fill_tab[crow]                         <= fill_tab[crow] + 32'd1;
        csr_mem[base_tab[crow] + RW'(fill_tab[crow])] <= conv_wdata;
      end
    end
  end

  assign row_base = base_tab[row_sel];
  assign row_fill = reserved[row_sel] ? fill_tab[row_sel] : 32'd0;
  assign csr_used = alloc_q;

  always_comb begin
    for (int unsigned p = 0; p < NPE; p++)
      csr_rdata[p] = csr_mem[csr_rptr + RW'(p)];
  end
endmodule
